// tb_bist_top: end-to-end self-checking testbench of the whole BIST system,
// at the default parameters (64 patterns, 16-bit MISR).
//
// The testbench carries its own model of the complete test: the
// deterministic s27 test and the Berlekamp-Massey polynomials of the two
// generators produce the pattern streams, a net-level s27 model with
// optional stuck-at fault gives the responses, and a polynomial-division
// MISR model gives the expected signature. Scenarios:
//   1. functional mode: s27 clocked every cycle from func_in
//   2. sequential-generator self-test, fault-free: pass, signature equal to
//      the model and to the built-in gold value, start-to-done latency
//   3. the same with the parallel generator
//   4. every one of the 34 single stuck-at faults, with both generators:
//      the test must fail (the deterministic part detects them all)
//   5. external gold signature, right and wrong
//   6. a restart from DONE, and a start while busy being ignored
// Each mechanism is counted and a mechanism that never occurred is a
// failure.
module tb_bist_top;
  import bist_pkg::*;

  localparam int NP = 64;
  localparam int P  = 4;
  localparam string DET = "011110110100101100010010";  // deterministic test, G0 first
  localparam string SEQ_C = "100001111011";            // c0..c11, sequential LFSR
  string par_c[P] = '{"10101", "1000", "1010", "111"};   // c0..cL per column

  logic clk = 1'b0;
  logic rst_n, start, tg_mode, gold_ext_sel;
  logic [15:0] gold_ext, signature;
  logic [3:0] func_in;
  logic func_out, fault_en, fault_val, busy, done, pass;
  logic [4:0] fault_net;
  int checks = 0, failures = 0;
  int n_func = 0, n_seq_pass = 0, n_par_pass = 0, n_seq_fail = 0, n_par_fail = 0;
  int n_ext_pass = 0, n_ext_fail = 0, n_restart = 0, n_busy_ignored = 0;

  always #5 clk = ~clk;

  bist_top dut (
    .clk, .rst_n, .start, .tg_mode, .gold_ext_sel, .gold_ext, .func_in, .func_out,
    .fault_en, .fault_net, .fault_val, .busy, .done, .pass, .signature);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model ----------------------------------------------------
  function automatic void s27_step(input logic [3:0] x, inout logic [2:0] st,
                                   input int n, input logic v, output logic y);
    logic [16:0] g;
    g = '0;
    g[3:0] = x; g[4] = st[2]; g[5] = st[1]; g[6] = st[0];
    for (int i = 0; i <= 6; i++) if (i == n) g[i] = v;
    g[13] = ~g[0];                  if (n == 13) g[13] = v;
    g[7]  = g[13] & g[5];           if (n == 7)  g[7]  = v;
    g[11] = ~(g[1] | g[6]);         if (n == 11) g[11] = v;
    g[14] = g[11] | g[7];           if (n == 14) g[14] = v;
    g[15] = g[3] | g[7];            if (n == 15) g[15] = v;
    g[8]  = ~(g[15] & g[14]);       if (n == 8)  g[8]  = v;
    g[10] = ~(g[4] | g[8]);         if (n == 10) g[10] = v;
    g[9]  = ~(g[13] | g[10]);       if (n == 9)  g[9]  = v;
    g[12] = ~(g[2] | g[11]);        if (n == 12) g[12] = v;
    g[16] = ~g[10];                 if (n == 16) g[16] = v;
    y  = g[16];
    st = {g[9], g[10], g[12]};
  endfunction

  logic [3:0] pats[2][NP];   // [0] sequential, [1] parallel

  task automatic build_patterns();
    bit s[NP*P];
    bit col[P][NP];
    for (int n = 0; n < NP*P; n++) begin
      if (n < DET.len()) s[n] = (DET[n] == "1");
      else begin
        s[n] = 1'b0;
        for (int i = 1; i < SEQ_C.len(); i++) if (SEQ_C[i] == "1") s[n] ^= s[n-i];
      end
    end
    for (int j = 0; j < P; j++)
      for (int t = 0; t < NP; t++) begin
        if (t < 6) col[j][t] = (DET[t*P + j] == "1");
        else begin
          col[j][t] = 1'b0;
          for (int i = 1; i < par_c[j].len(); i++) if (par_c[j][i] == "1") col[j][t] ^= col[j][t-i];
        end
      end
    for (int t = 0; t < NP; t++)
      for (int j = 0; j < P; j++) begin
        pats[0][t][j] = s[t*P + j];
        pats[1][t][j] = col[j][t];
      end
  endtask

  function automatic logic [15:0] model_signature(input int mode, input int n, input logic v);
    logic [2:0] st = 3'b000;
    logic [16:0] sg = '0;
    logic y;
    for (int t = 0; t < NP; t++) begin
      s27_step(pats[mode][t], st, n, v, y);
      sg = {sg[15:0], 1'b0};
      if (sg[16]) sg ^= 17'h1002D;
      sg[0] ^= y;
    end
    return sg[15:0];
  endfunction

  // ---- stimulus helpers ---------------------------------------------------
  task automatic run_test(input int mode, output int cycles);
    tg_mode = mode[0];
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cycles = 1;
    while (!done && cycles < 2000) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [15:0] ref_sig[2];
    logic [2:0] st;
    logic y;
    build_patterns();
    check(pats[0][0] == 4'b1110 && pats[0][5] == 4'b0100 && pats[1][5] == 4'b0100,
          "reference patterns start with the deterministic test");
    ref_sig[0] = model_signature(0, -1, 1'b0);
    ref_sig[1] = model_signature(1, -1, 1'b0);

    rst_n = 1'b0; start = 1'b0; tg_mode = 1'b0; gold_ext_sel = 1'b0; gold_ext = '0;
    func_in = '0; fault_en = 1'b0; fault_net = '0; fault_val = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. functional mode
    st = 3'b000;
    for (int t = 0; t < 50; t++) begin
      func_in = 4'($urandom);
      #1;
      s27_step(func_in, st, -1, 1'b0, y);
      check(func_out == y, $sformatf("functional cycle %0d", t));
      if (func_out == y) n_func++;
      @(posedge clk); #1;
    end

    // 2./3. fault-free self-test with both generators
    for (int mode = 0; mode < 2; mode++) begin
      run_test(mode, cyc);
      check(done && pass, $sformatf("fault-free test passes (mode %0d)", mode));
      check(signature == ref_sig[mode], $sformatf("mode %0d signature %h, model %h", mode, signature, ref_sig[mode]));
      check(signature == (mode ? 16'h8413 : 16'hFC5A), "signature equals the built-in gold value");
      check(cyc == (mode ? 3 + NP : 3 + (NP - 1) * P + 1),
            $sformatf("mode %0d start to done in %0d clocks", mode, cyc));
      if (done && pass) begin
        if (mode == 0) n_seq_pass++; else n_par_pass++;
      end
      if (mode == 0) n_restart++;  // the next run starts from DONE
    end

    // 4. every single stuck-at fault, both generators
    for (int mode = 0; mode < 2; mode++)
      for (int n = 0; n < 17; n++)
        for (int v = 0; v < 2; v++) begin
          logic [15:0] fs;
          fault_en = 1'b1; fault_net = 5'(n); fault_val = v[0];
          fs = model_signature(mode, n, v[0]);
          run_test(mode, cyc);
          check(done && !pass, $sformatf("mode %0d fault net %0d sa%0d detected", mode, n, v));
          check(signature == fs, $sformatf("mode %0d fault net %0d sa%0d signature", mode, n, v));
          if (done && !pass) begin
            if (mode == 0) n_seq_fail++; else n_par_fail++;
          end
        end
    fault_en = 1'b0;

    // 5. external gold
    gold_ext_sel = 1'b1;
    gold_ext = ref_sig[1];
    run_test(1, cyc);
    check(done && pass, "external gold, correct value");
    if (done && pass) n_ext_pass++;
    gold_ext = ref_sig[1] ^ 16'h0100;
    run_test(1, cyc);
    check(done && !pass, "external gold, wrong value");
    if (done && !pass) n_ext_fail++;
    gold_ext_sel = 1'b0;

    // 6. start while busy is ignored (mode stays sequential)
    tg_mode = 1'b0;
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    repeat (5) @(posedge clk);
    #1 tg_mode = 1'b1; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (!done) @(posedge clk);
    #1 check(pass && signature == ref_sig[0], "start while busy does not disturb the run");
    if (pass && signature == ref_sig[0]) n_busy_ignored++;

    $display("mechanisms: functional=%0d seq_pass=%0d par_pass=%0d seq_fault_detected=%0d par_fault_detected=%0d ext_gold_pass=%0d ext_gold_fail=%0d restart=%0d busy_start_ignored=%0d",
             n_func, n_seq_pass, n_par_pass, n_seq_fail, n_par_fail, n_ext_pass, n_ext_fail, n_restart, n_busy_ignored);
    check(n_func > 0, "functional mode exercised");
    check(n_seq_pass > 0 && n_par_pass > 0, "both generators exercised");
    check(n_seq_fail == 34 && n_par_fail == 34, "all 34 faults detected with both generators");
    check(n_ext_pass > 0 && n_ext_fail > 0, "external gold exercised");
    check(n_restart > 0 && n_busy_ignored > 0, "restart and busy start exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
