// agu: address generation unit that accompanies a local memory.
//
// It produces the sequence base, base+stride, base+2*stride, ... : clr restarts the
// offset at zero, step advances it by stride. addr = base + offset is combinational so
// it can be presented to a memory in the same cycle. The document only names the unit
// ("a reconfigurable AGU accompanies each memory"); this base-plus-stride counter is the
// simplest form that covers the decoder's linear scans.
module agu #(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          step,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,
  output logic [AW-1:0] offset,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    offset <= '0;
    else if (clr)  offset <= '0;
    else if (step) offset <= offset + stride;
  end

  assign addr = base + offset;

endmodule
