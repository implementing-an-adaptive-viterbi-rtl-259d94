// vit_pkg: sizes, types and helper functions shared by the adaptive Viterbi decoder.
//
// The datapath word is 16 bits and every local memory is 512 words of 16 bits, as on the
// coarse-grained tile the decoder is mapped onto. The largest code supported is constraint
// length 7 (64 trellis states, the DAB code) with up to 4 code bits per information bit
// (rate 1/4). Received code bits are soft values of SOFT_W bits (0 = certain '0',
// SOFT_MAX = certain '1'); the soft width is a choice of this design.
//
// State numbering: a state holds the last K-1 input bits, the newest in its most
// significant bit, so state s moves to s/2 on a decoded '0' and to (s+N)/2 on a '1'.
// Path metrics are spread over two memory banks so that both states read by a butterfly
// (2b, 2b+1) and both states it writes (b, b+N/2) always sit in different banks:
// bank(s) = s[0] ^ s[K-2], address within the bank = s >> 1. This mapping is this
// design's own choice.
package vit_pkg;

  localparam int unsigned WORD_W     = 16;   // datapath width
  localparam int unsigned MEM_DEPTH  = 512;  // words per local memory
  localparam int unsigned MEM_AW     = 9;    // address width of a local memory
  localparam int unsigned MAX_K      = 7;    // largest constraint length
  localparam int unsigned MAX_N      = 4;    // largest number of code bits per symbol
  localparam int unsigned SOFT_W     = 3;    // soft-decision width of a received code bit
  localparam int unsigned SOFT_MAX   = (1 << SOFT_W) - 1;
  localparam int unsigned MAX_STATES = 1 << (MAX_K - 1);      // 64
  localparam int unsigned SLOT_WORDS = MAX_STATES / 2;        // words per bank per RE slot
  localparam int unsigned NUM_SLOTS  = MEM_DEPTH / SLOT_WORDS; // 16
  localparam int unsigned RING       = NUM_SLOTS - 2;         // slots kept for finished segments
  localparam logic [WORD_W-1:0] PM_INIT = 16'd4096;           // start metric of states other than 0

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [MEM_AW-1:0]    addr_t;
  typedef logic [MAX_K-2:0]     state_t;
  typedef logic [SOFT_W-1:0]    soft_t;

  // Run-time configuration ("partial reconfiguration" of the decoder).
  typedef struct packed {
    logic [2:0]                      k;        // constraint length, 3..7
    logic [2:0]                      n;        // code bits per symbol (rate 1/n), 2..4
    logic [MAX_N-1:0][MAX_K-1:0]     gen;      // generator polynomials, bit K-1 = tap on the current input
    logic [3:0]                      seg_len;  // decisions per RE word, 1..17-K (10 for DAB)
  } cfg_t;

  typedef enum logic [2:0] {
    PH_WAIT   = 3'd0,  // waiting for the next received symbol
    PH_BMC    = 3'd6,  // computing the branch metrics of the stage
    PH_BFLY   = 3'd1,  // issuing butterflies of one trellis stage
    PH_DRAIN  = 3'd2,  // last butterfly write, end of stage
    PH_SEARCH = 3'd3,  // scanning path metrics for the minimum
    PH_SDRAIN = 3'd4,  // last compare of the search
    PH_LOOKUP = 3'd5   // following RE pointers to the decided bits
  } phase_t;

  // DAB convolutional code, rate 1/4, K = 7: generators 133, 171, 145, 133 (octal).
  localparam cfg_t CFG_DAB = '{k: 3'd7, n: 3'd4,
                               gen: {7'o133, 7'o145, 7'o171, 7'o133},
                               seg_len: 4'd10};
  localparam logic [7:0] DEPTH_DAB = 8'd50;

  // Bank that holds state s for constraint length k.
  function automatic logic bank_of(input state_t s, input logic [2:0] k);
    return s[0] ^ s[k - 3'd2];
  endfunction

  // Codeword of the branch leaving state s with input bit u: code bit j is the parity of
  // the encoder register {u, s} masked by generator j; bits at and above n are zero.
  function automatic logic [MAX_N-1:0] codeword(input cfg_t c, input state_t s, input logic u);
    logic [MAX_K-1:0] r, kmask;
    logic [MAX_N-1:0] cw;
    kmask = MAX_K'((8'd1 << c.k) - 8'd1);
    r     = MAX_K'(s) | (MAX_K'(u) << (c.k - 3'd1));
    for (int j = 0; j < MAX_N; j++) cw[j] = (j < int'(c.n)) ? ^(r & c.gen[j] & kmask) : 1'b0;
    return cw;
  endfunction

  // Width of the decision-bit field of an RE word: 16 minus the K-1 pointer bits.
  function automatic logic [4:0] field_w(input logic [2:0] k);
    return 5'(WORD_W) - 5'(k - 3'd1);
  endfunction

endpackage
