// bist_top: LFSR/MISR built-in self-test system around the s27 benchmark.
//
// The test system has the parts of the classic LFSR-based BIST structure:
// a test generator, the circuit under test, a signature analyser, a test
// controller, a gold-signature register and a comparator. Two test
// generators are built, both synthesised from the same deterministic s27
// test by the Berlekamp-Massey algorithm: a sequential one (a single
// 11-stage LFSR, one 4-bit pattern every 4 clocks) and a parallel one
// (four 4-stage LFSRs, one pattern per clock). tg_mode, sampled when a
// test is started, chooses which one drives the CUT. The first six
// patterns of either generator are the deterministic test, which detects
// every single stuck-at fault of s27; the generator then keeps running and
// the remaining patterns up to NUM_PATTERNS are pseudo-random.
//
// Operation: pulse start (for one clock) while not busy. The controller
// reloads the generator, clears the s27 flip-flops and the MISR and loads
// the gold register (internal gold for the chosen generator, or gold_ext
// when gold_ext_sel is high), steps the CUT once per pattern while the MISR
// compacts G17, and finally compares. done then stays high with pass and
// the final signature until the next start. Outside a test the CUT works
// functionally: its inputs are func_in and its flip-flops are clocked
// every cycle; func_out is G17 at all times. fault_en/fault_net/fault_val
// place a stuck-at fault in the CUT so that a failing test can be shown.
//
// Latency from start to done: 3 + (NUM_PATTERNS-1)*4 + 1 clocks with the
// sequential generator, 3 + NUM_PATTERNS clocks with the parallel one.
// The structure follows the method; the sequencing, the functional/test
// multiplexer, the MISR size and the test length are this design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned                NUM_PATTERNS = bist_pkg::NUM_PATTERNS_DEF,
  parameter int unsigned                MISR_WIDTH   = bist_pkg::MISR_WIDTH_DEF,
  parameter logic [MISR_WIDTH-1:0]      MISR_POLY    = bist_pkg::MISR_POLY_DEF,
  parameter logic [MISR_WIDTH-1:0]      GOLD_SEQ     = bist_pkg::GOLD_SEQ_DEF,
  parameter logic [MISR_WIDTH-1:0]      GOLD_PAR     = bist_pkg::GOLD_PAR_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  tg_mode,
  input  logic                  gold_ext_sel,
  input  logic [MISR_WIDTH-1:0] gold_ext,
  input  logic [S27_NUM_IN-1:0] func_in,
  output logic                  func_out,
  input  logic                  fault_en,
  input  logic [NET_IDX_W-1:0]  fault_net,
  input  logic                  fault_val,
  output logic                  busy,
  output logic                  done,
  output logic                  pass,
  output logic [MISR_WIDTH-1:0] signature
);

  tg_mode_e              mode_q;
  logic                  init, tg_en, apply, cmp, test_mode;
  logic [S27_NUM_IN-1:0] seq_pattern, par_pattern, tg_pattern, cut_in;
  logic                  seq_valid, par_valid, tg_valid;
  logic                  cut_en, cut_out;
  logic [MISR_WIDTH-1:0] gold;
  logic                  cmp_valid;

  // Generator selection is held for the whole run
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               mode_q <= TG_SEQUENTIAL;
    else if (start && !busy)  mode_q <= tg_mode_e'(tg_mode);
  end

  bist_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .pattern_valid (tg_valid),
    .init          (init),
    .tg_en         (tg_en),
    .apply         (apply),
    .cmp           (cmp),
    .test_mode     (test_mode),
    .busy          (busy),
    .done          (done)
  );

  seq_test_gen #(.P(S27_NUM_IN)) u_seq_tg (
    .clk           (clk),
    .rst_n         (rst_n),
    .load          (init),
    .en            (tg_en && (mode_q == TG_SEQUENTIAL)),
    .pattern       (seq_pattern),
    .pattern_valid (seq_valid)
  );

  par_test_gen #(.P(S27_NUM_IN)) u_par_tg (
    .clk           (clk),
    .rst_n         (rst_n),
    .load          (init),
    .en            (tg_en && (mode_q == TG_PARALLEL)),
    .pattern       (par_pattern),
    .pattern_valid (par_valid)
  );

  always_comb begin
    if (mode_q == TG_PARALLEL) begin
      tg_pattern = par_pattern;
      tg_valid   = par_valid;
    end else begin
      tg_pattern = seq_pattern;
      tg_valid   = seq_valid;
    end
    cut_in = test_mode ? tg_pattern : func_in;
    cut_en = test_mode ? apply : !busy;
  end

  s27_cut u_cut (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (cut_en),
    .clr       (init),
    .pi        (cut_in),
    .po        (cut_out),
    .fault_en  (fault_en),
    .fault_net (fault_net),
    .fault_val (fault_val)
  );

  misr #(.WIDTH(MISR_WIDTH), .N_IN(S27_NUM_OUT), .POLY(MISR_POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (init),
    .en    (apply),
    .d     (cut_out),
    .sig   (signature)
  );

  gold_sig_reg #(.WIDTH(MISR_WIDTH), .GOLD_SEQ(GOLD_SEQ), .GOLD_PAR(GOLD_PAR)) u_gold (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (init),
    .tg_mode  (mode_q),
    .ext_sel  (gold_ext_sel),
    .ext_gold (gold_ext),
    .gold     (gold)
  );

  sig_comparator #(.WIDTH(MISR_WIDTH)) u_cmp (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (init),
    .cmp   (cmp),
    .sig   (signature),
    .gold  (gold),
    .pass  (pass),
    .valid (cmp_valid)
  );

  assign func_out = cut_out;

  // Whenever the controller reports done, the comparison result is valid
  a_done_valid: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> cmp_valid);

endmodule
