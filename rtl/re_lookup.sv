// re_lookup: look-up of the decided bits by following RE pointers.
//
// After a segment is finished, start launches a walk from start_state (the state with
// the smallest path metric) through the ring of finished segments: it reads the word of
// the current state in the newest segment's slot, takes its pointer as the state for the
// segment before, and repeats hops times. The decision field of the word reached after
// the last hop holds the decoded bits of that old segment; they are given out on bits
// with a one-cycle done pulse, earliest decision in bit seg_len-1, latest in bit 0. One
// read per cycle: a walk of h hops takes h+2 cycles from start to done (7 for DAB).
// Pointer chaining follows the document; the ring slot arithmetic is this design's.
module re_lookup
  import vit_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   k,
  input  logic [3:0]   seg_len,
  input  logic         start,
  input  state_t       start_state,
  input  logic [3:0]   ring_cur,     // ring index of the newest finished segment
  input  logic [3:0]   hops,         // segments to walk back, 1..RING-1
  output logic         rd_en,
  output addr_t        rd_addr,      // same address for both banks
  input  word_t [1:0]  rd_data,
  output logic         busy,
  output logic         done,
  output word_t        bits
);

  logic [3:0] h_q;          // hops done so far
  logic       bank_q;       // bank of the word being read
  state_t     next_state;
  logic [3:0] slot_idx;
  state_t     rd_state;
  logic [3:0] rd_hop;
  word_t      word;
  logic [4:0] fw;

  always_comb begin
    fw         = field_w(k);
    word       = rd_data[bank_q];
    next_state = state_t'(word >> fw);
    // which word to read this cycle
    if (start) begin
      rd_en    = 1'b1;
      rd_state = start_state;
      rd_hop   = '0;
    end else begin
      rd_en    = busy && (h_q != hops);
      rd_state = next_state;
      rd_hop   = h_q + 4'd1;
    end
    slot_idx = (ring_cur >= rd_hop) ? (ring_cur - rd_hop) : (ring_cur + 4'(RING) - rd_hop);
    rd_addr  = addr_t'((32'(slot_idx) + 32'd2) * SLOT_WORDS) + (addr_t'(rd_state) >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      h_q    <= '0;
      bank_q <= 1'b0;
      bits   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        h_q    <= '0;
        bank_q <= bank_of(start_state, k);
      end else if (busy) begin
        if (h_q == hops) begin
          busy <= 1'b0;
          done <= 1'b1;
          bits <= word & ((WORD_W'(1) << seg_len) - WORD_W'(1));
        end else begin
          h_q    <= h_q + 4'd1;
          bank_q <= bank_of(next_state, k);
        end
      end
    end
  end

endmodule
