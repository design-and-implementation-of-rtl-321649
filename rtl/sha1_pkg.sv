// sha1_pkg: types, constants and small functions shared by the SHA-1 hash
// core and the SHA-1 collision-search building block.
//
// SHA-1 is computed here in the "A-only" form: the five working variables
// a..e of a step t are a = A(t), b = A(t-1), c = ROTL30(A(t-2)),
// d = ROTL30(A(t-3)), e = ROTL30(A(t-4)), so a step only has to produce the
// new word A(t+1) and shift it into a group of five registers.
//
// A condition word (cond_t) describes what a differential characteristic
// demands of one 32-bit word of a message pair (lane 1, lane 2):
//   dmask/dval : bits whose XOR difference lane1^lane2 is fixed, and its value
//   vmask/vval : bits whose lane-1 value is fixed, and its value
// Together they express the usual signed-difference symbols ('u', 'n', 'x',
// '-', '0', '1', '?'). This encoding is a choice of this design.
package sha1_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t dmask;
    word_t dval;
    word_t vmask;
    word_t vval;
  } cond_t;

  localparam int unsigned NROUNDS = 80;   // SHA-1 steps
  localparam int unsigned NAROWS  = 85;   // A(-4) .. A(80): row r holds A(r-4)
  localparam int unsigned NWORDS  = 16;   // 512-bit block = sixteen 32-bit words

  // Initial chaining value
  localparam word_t IV0 = 32'h67452301;
  localparam word_t IV1 = 32'hefcdab89;
  localparam word_t IV2 = 32'h98badcfe;
  localparam word_t IV3 = 32'h10325476;
  localparam word_t IV4 = 32'hc3d2e1f0;

  // Round constants, one per group of twenty steps
  localparam word_t K0 = 32'h5a827999;
  localparam word_t K1 = 32'h6ed9eba1;
  localparam word_t K2 = 32'h8f1bbcdc;
  localparam word_t K3 = 32'hca62c1d6;

  // Field numbers of a condition row as seen on the system bus
  typedef enum logic [1:0] {
    F_DMASK = 2'd0,
    F_DVAL  = 2'd1,
    F_VMASK = 2'd2,
    F_VVAL  = 2'd3
  } cond_field_e;

  // Source of the W word a Generate W block hands out
  typedef enum logic [1:0] {
    WSRC_RAND = 2'd0,   // new random message word, consistent with the characteristic
    WSRC_MSG  = 2'd1,   // stored message word, with auxiliary-path flips applied
    WSRC_EXP  = 2'd2,   // word from the message-expansion XOR network
    WSRC_SEG  = 2'd3    // stored word with its free bits set by the segmented counter
  } wsrc_e;

  // System-bus word addresses (12-bit)
  localparam logic [11:0] A_CTRL     = 12'h000;  // W: [0] start [1] stop [2] load seed; R: status
  localparam logic [11:0] A_CONFIG   = 12'h001;
  localparam logic [11:0] A_SEED     = 12'h002;
  localparam logic [11:0] A_ROUND    = 12'h003;  // R: last round evaluated / found round
  localparam logic [11:0] A_TRIALS   = 12'h004;  // R: lo, +1 hi
  localparam logic [11:0] A_EOS      = 12'h006;  // R: lo, +1 hi
  localparam logic [11:0] A_RESEEDS  = 12'h008;  // R: lo, +1 hi
  localparam logic [11:0] A_FOUNDS   = 12'h00A;  // R: lo, +1 hi
  localparam logic [3:0]  PG_WCHAR   = 4'h2;     // 0x200-0x3FF: row*4 + field
  localparam logic [3:0]  PG_WCHAR2  = 4'h3;
  localparam logic [3:0]  PG_ACHAR   = 4'h4;     // 0x400-0x5FF: row*4 + field
  localparam logic [3:0]  PG_ACHAR2  = 4'h5;
  localparam logic [3:0]  PG_MSG     = 4'h6;     // 0x600-0x60F msg1, 0x610-0x61F msg2
  localparam logic [3:0]  PG_AP1     = 4'h8;     // 0x800-0x8FF: path*16 + word
  localparam logic [3:0]  PG_AP2     = 4'h9;
  localparam logic [3:0]  PG_STAT    = 4'hA;     // 0xA00-0xAFF: round*2 + {lo,hi}

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Non-linear function of step t: choose, parity, majority, parity
  function automatic word_t f_t(input logic [6:0] t, input word_t x, input word_t y,
                                input word_t z);
    if (t < 7'd20)      return (x & y) | (~x & z);
    else if (t < 7'd40) return x ^ y ^ z;
    else if (t < 7'd60) return (x & y) | (x & z) | (y & z);
    else                return x ^ y ^ z;
  endfunction

  function automatic word_t k_t(input logic [6:0] t);
    if (t < 7'd20)      return K0;
    else if (t < 7'd40) return K1;
    else if (t < 7'd60) return K2;
    else                return K3;
  endfunction

  // Lane-1 word built from random bits r: fixed-value bits forced, the rest random
  function automatic word_t cond_fill(input word_t r, input cond_t c);
    return (r & ~c.vmask) | (c.vval & c.vmask);
  endfunction

  // Required lane1 ^ lane2 difference
  function automatic word_t cond_diff(input cond_t c);
    return c.dval & c.dmask;
  endfunction

  // Does the pair (x1, x2) satisfy the condition word?
  function automatic logic cond_ok(input word_t x1, input word_t x2, input cond_t c);
    return (((x1 ^ x2) & c.dmask) == (c.dval & c.dmask)) &&
           ((x1 & c.vmask) == (c.vval & c.vmask));
  endfunction

  // Search configuration written by the host through the CONFIG register:
  // [6:0] start step s, [14:8] end step, [16] AP enable, [17] segmented
  // counter enable, [18] check W part, [19] check A part, [27:24] message word
  // enumerated by the segmented counter.
  typedef struct packed {
    logic [6:0] start_round;
    logic [6:0] end_round;
    logic       ap_en;
    logic       seg_en;
    logic       check_w;
    logic       check_a;
    logic [3:0] enum_word;
  } search_cfg_t;

  // Control word the search FSM drives into the datapath each cycle
  typedef struct packed {
    wsrc_e      wsrc;        // Generate W source
    logic       w_shift;     // shift Generate W output into the expansion register
    logic       msg_we;      // write Generate W output into the message memories
    logic [3:0] msg_addr;    // message word read (and written)
    logic [6:0] wchar_addr;  // W-part row
    logic [6:0] achar_addr;  // A-part row
    logic       lfsr_step;   // take a new random word
    logic       a_gen_shift; // shift Generate A output into the A registers
    logic       a_rnd_shift; // shift the round-function output into the A registers
    logic       a_snap;      // keep the reconstructed state
    logic       a_restore;   // go back to the reconstructed state
    logic       ap_clear;
    logic       ap_step;
    logic       seg_load;
    logic       seg_step;
    logic       eo_valid;    // a step is executed and evaluated this cycle
    logic [6:0] round;       // its step index
    logic       trial_inc;
    logic       reseed_inc;
    logic       found_inc;
  } search_ctrl_t;

endpackage
