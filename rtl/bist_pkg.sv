// bist_pkg: types and default constants shared by the LFSR/MISR built-in
// self-test (BIST) around the ISCAS'89 benchmark s27.
//
// The test-generator constants are the result of the synthesis flow the
// design is built around: a deterministic test sequence for s27 (six 4-bit
// patterns that detect all 34 single stuck-at faults on its 17 nets,
// starting from the all-zero flip-flop state) is fed to the Berlekamp-Massey
// algorithm, which returns the shortest LFSR that reproduces it.
//
//   deterministic test, pattern t = {G3,G2,G1,G0}:
//     t0 = 1110  t1 = 1101  t2 = 0010  t3 = 1101  t4 = 1000  t5 = 0100
//   (written G0 first: 0111 1011 0100 1011 0001 0010)
//
// Sequential generator: the 24 bits above, taken G0 first, give a linear
// complexity L = 11 and C(D) = 1 + D^5 + D^6 + D^7 + D^8 + D^10 + D^11
// (primitive). Parallel generator: one LFSR per input column, with
// C0 = 1 + D^2 + D^4 (L = 4), C1 = 1 (L = 3), C2 = 1 + D^2 (L = 3) and
// C3 = 1 + D + D^2 (L = 2), every one embedded in a 4-stage register.
//
// Tap/seed encoding used by alfsr: the register holds a window of the bit
// stream, state[0] being the oldest bit. A recurrence
// s[N] = sum c_i s[N-i] (i = 1..L) run in a WIDTH >= L register has
// TAPS[WIDTH-i] = c_i, and the seed is the first WIDTH bits of the
// sequence, bit j of the seed being s[j].
//
// The gold signatures are the fault-free contents of the 16-bit MISR after
// NUM_PATTERNS_DEF = 64 patterns of each generator (deterministic part plus
// the pseudo-random continuation); they were obtained from an independent
// model of s27, the generators and the MISR.
package bist_pkg;

  // s27 has 4 primary inputs, 1 primary output, 3 flip-flops, 17 nets
  localparam int unsigned S27_NUM_IN   = 4;
  localparam int unsigned S27_NUM_OUT  = 1;
  localparam int unsigned S27_NUM_NETS = 17;
  localparam int unsigned NET_IDX_W    = 5;

  // Net index used to select a stuck-at fault site in s27_cut
  typedef enum logic [NET_IDX_W-1:0] {
    NET_G0  = 5'd0,  NET_G1  = 5'd1,  NET_G2  = 5'd2,  NET_G3  = 5'd3,
    NET_G5  = 5'd4,  NET_G6  = 5'd5,  NET_G7  = 5'd6,  NET_G8  = 5'd7,
    NET_G9  = 5'd8,  NET_G10 = 5'd9,  NET_G11 = 5'd10, NET_G12 = 5'd11,
    NET_G13 = 5'd12, NET_G14 = 5'd13, NET_G15 = 5'd14, NET_G16 = 5'd15,
    NET_G17 = 5'd16
  } s27_net_e;

  // Sequential test generator (one LFSR, L = 11)
  localparam int unsigned          SEQ_WIDTH = 11;
  localparam logic [SEQ_WIDTH-1:0] SEQ_TAPS  = 11'h07B;
  localparam logic [SEQ_WIDTH-1:0] SEQ_SEED  = 11'h2DE;

  // Parallel test generator (one LFSR per CUT input), entry j drives input j
  localparam int unsigned PAR_WIDTH = 4;
  localparam logic [S27_NUM_IN-1:0][PAR_WIDTH-1:0] PAR_TAPS  = {4'hC, 4'h4, 4'h0, 4'h5};
  localparam logic [S27_NUM_IN-1:0][PAR_WIDTH-1:0] PAR_SEEDS = {4'hB, 4'hB, 4'h5, 4'hA};

  // Signature analyser: x^16 + x^5 + x^3 + x^2 + 1 (primitive), Galois form
  localparam int unsigned           MISR_WIDTH_DEF = 16;
  localparam logic [MISR_WIDTH_DEF-1:0] MISR_POLY_DEF  = 16'h002D;

  // Length of one self-test run and the fault-free signatures
  localparam int unsigned           NUM_PATTERNS_DEF = 64;
  localparam logic [MISR_WIDTH_DEF-1:0] GOLD_SEQ_DEF     = 16'hFC5A;
  localparam logic [MISR_WIDTH_DEF-1:0] GOLD_PAR_DEF     = 16'h8413;

  // Which test generator drives the CUT
  typedef enum logic {
    TG_SEQUENTIAL = 1'b0,
    TG_PARALLEL   = 1'b1
  } tg_mode_e;

  // Test controller states
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_INIT = 3'd1,
    ST_RUN  = 3'd2,
    ST_CMP  = 3'd3,
    ST_DONE = 3'd4
  } bist_state_e;

endpackage
