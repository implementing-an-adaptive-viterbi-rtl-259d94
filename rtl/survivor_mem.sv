// survivor_mem: register-exchange survivor memory with pointers.
//
// Every state owns one 16-bit RE word per stored trellis stage: the top K-1 bits are a
// pointer, the state the survivor passed through at the end of the previous segment; the
// low 17-K bits are the decoded bits of the survivor inside the current segment, newest
// in bit 0 (for K = 7: a 6-bit pointer and 10 decision bits). A segment is as many stages
// as fit in the decision field (cfg seg_len). On each butterfly the module builds the new
// words of the two target states from the word of the surviving source state: in the
// first stage of a segment the word becomes {source state, decision bit}; later the
// pointer is kept and the decision bit is shifted in. The decision bit is 0 for the upper
// target S_i/2 and 1 for the lower target S_(i+N)/2.
//
// Storage is two local memories (one per bank, same state-to-bank mapping as the path
// metrics), each cut into 16 slots of 32 words: slots 0 and 1 are scratch for the stages
// inside a segment, slots 2..15 a ring that keeps the last word of each finished segment.
// Reads (rd_en/rd_addr, per bank) return data one cycle later; a butterfly update
// (upd_en) uses the data read in the previous cycle and writes at the clock edge.
// Word layout, pointer chaining and the ten-bit field for DAB follow the document; the
// slot layout, the scratch ping-pong and the read/write port split are this design's.
module survivor_mem
  import vit_pkg::*;
(
  input  logic         clk,
  input  logic [2:0]   k,              // constraint length in use
  input  logic         rd_en,
  input  addr_t [1:0]  rd_addr,        // per bank
  output word_t [1:0]  rd_data,        // per bank
  input  logic         upd_en,
  input  logic         upd_first,      // first stage of a segment
  input  state_t       upd_b,          // butterfly index b: sources 2b, 2b+1; targets b, b+N/2
  input  logic         upd_sel_up,     // survivor of target b comes from 2b+1
  input  logic         upd_sel_lo,     // survivor of target b+N/2 comes from 2b+1
  input  addr_t        upd_base        // slot base address written by this stage
);

  word_t [1:0] wr_data;
  addr_t [1:0] wr_addr;
  addr_t       addr_up, addr_lo;
  logic        bank_src;               // bank holding source state 2b
  state_t      src_even;
  word_t       w_even, w_odd, w_up, w_lo;
  state_t      half_n;
  logic [4:0]  fw;

  // New RE word of a target state from its surviving source
  function automatic word_t re_word(input logic first, input word_t src_word,
                                    input state_t src_state, input logic dbit,
                                    input logic [4:0] fwidth);
    word_t fmask, ptr_part;
    fmask = (WORD_W'(1) << fwidth) - WORD_W'(1);
    if (first) ptr_part = WORD_W'(src_state) << fwidth;
    else       ptr_part = src_word & ~fmask;
    return ptr_part | (first ? WORD_W'(dbit) : (((src_word << 1) | WORD_W'(dbit)) & fmask));
  endfunction

  always_comb begin
    fw       = field_w(k);
    half_n   = state_t'(1) << (k - 3'd2);
    src_even = {upd_b[MAX_K-3:0], 1'b0};
    bank_src = bank_of(src_even, k);
    w_even   = rd_data[bank_src];
    w_odd    = rd_data[~bank_src];
    w_up     = re_word(upd_first, upd_sel_up ? w_odd : w_even,
                       upd_sel_up ? (src_even | state_t'(1)) : src_even, 1'b0, fw);
    w_lo     = re_word(upd_first, upd_sel_lo ? w_odd : w_even,
                       upd_sel_lo ? (src_even | state_t'(1)) : src_even, 1'b1, fw);
    // target b sits in bank b[0]; target b+N/2 in the other bank
    addr_up    = upd_base + (addr_t'(upd_b) >> 1);
    addr_lo    = upd_base + ((addr_t'(upd_b) + addr_t'(half_n)) >> 1);
    wr_data[0] = upd_b[0] ? w_lo : w_up;
    wr_data[1] = upd_b[0] ? w_up : w_lo;
    wr_addr[0] = upd_b[0] ? addr_lo : addr_up;
    wr_addr[1] = upd_b[0] ? addr_up : addr_lo;
  end

  for (genvar m = 0; m < 2; m++) begin : g_bank
    local_mem #(.DEPTH(MEM_DEPTH), .WIDTH(WORD_W)) u_mem (
      .clk   (clk),
      .we    (upd_en),
      .waddr (wr_addr[m]),
      .wdata (wr_data[m]),
      .re    (rd_en),
      .raddr (rd_addr[m]),
      .rdata (rd_data[m])
    );
  end

endmodule
