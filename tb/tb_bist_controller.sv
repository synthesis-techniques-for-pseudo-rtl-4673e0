// tb_bist_controller: self-checking testbench for the test controller.
//
// A small pattern source offers pattern_valid once every K clocks (K = 4
// like the sequential generator, then K = 1 like the parallel one) while
// tg_en is high. The testbench checks the state sequence IDLE -> INIT
// (one cycle, init high) -> RUN -> CMP (one cycle) -> DONE, that exactly
// NUM_PATTERNS applies happen, each coinciding with pattern_valid, the
// cycle count from start to done, and a restart from DONE.
// NUM_PATTERNS is reduced to 10 to keep the test short.
module tb_bist_controller;

  localparam int NP = 10;

  logic clk = 1'b0;
  logic rst_n, start, pattern_valid;
  logic init, tg_en, apply, cmp, test_mode, busy, done;
  int checks = 0, failures = 0;
  int k_period = 4;
  int phase;

  always #5 clk = ~clk;

  bist_controller #(.NUM_PATTERNS(NP)) dut (
    .clk, .rst_n, .start, .pattern_valid, .init, .tg_en, .apply, .cmp, .test_mode, .busy, .done);

  // pattern source: valid in phase 0, phase advances while tg_en
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    phase <= 0;
    else if (init) phase <= 0;
    else if (tg_en) phase <= (phase == k_period - 1) ? 0 : phase + 1;
  assign pattern_valid = (phase == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one_run(input int k);
    int cyc, n_apply, n_init, n_cmp;
    k_period = k;
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cyc = 1; n_apply = 0; n_init = 0; n_cmp = 0;
    while (!done && cyc < 1000) begin
      if (init) begin
        n_init++;
        check(test_mode && busy && !tg_en, "INIT outputs");
      end
      if (apply) begin
        n_apply++;
        check(pattern_valid && tg_en && test_mode, "apply only with a valid pattern in RUN");
      end
      if (cmp) begin
        n_cmp++;
        check(n_apply == NP && !test_mode && busy, "CMP after the last pattern");
      end
      @(posedge clk); #1 cyc++;
    end
    check(n_init == 1 && n_cmp == 1, "one INIT and one CMP cycle");
    check(n_apply == NP, $sformatf("%0d patterns applied, expected %0d", n_apply, NP));
    // start registered at cycle 0, INIT 1, RUN (NP-1)*k+1, CMP 1, DONE visible
    check(cyc == 3 + (NP - 1) * k + 1, $sformatf("start to done in %0d clocks (K = %0d)", cyc, k));
    check(done && !busy && !test_mode, "DONE outputs");
    repeat (3) @(posedge clk);
    #1 check(done, "DONE holds");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done && !test_mode, "IDLE after reset");
    repeat (3) @(posedge clk);
    #1 check(!busy && !done, "IDLE holds without start");
    one_run(4);
    one_run(1);   // restart from DONE
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
