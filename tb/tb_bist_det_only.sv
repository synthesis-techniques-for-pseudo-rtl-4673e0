// tb_bist_det_only: runs the BIST system with the test cut down to its
// deterministic part (NUM_PATTERNS = 6) and shows that these six patterns
// alone detect every single stuck-at fault of s27, with both generators.
//
// The gold signature is given externally (gold_ext_sel = 1) and computed
// here from a net-level s27 model and a polynomial-division MISR model fed
// with the six deterministic patterns, which both generators must produce
// first. Checked: fault-free runs pass with the model signature, each of
// the 34 faults fails, the run takes 3 + 5*4 + 1 (sequential) or 3 + 6
// (parallel) clocks.
module tb_bist_det_only;

  localparam int NP = 6;
  localparam string DET = "011110110100101100010010";  // G0 first

  logic clk = 1'b0;
  logic rst_n, start, tg_mode;
  logic [15:0] gold_ext, signature;
  logic func_out, fault_en, fault_val, busy, done, pass;
  logic [4:0] fault_net;
  int checks = 0, failures = 0, detected = 0;

  always #5 clk = ~clk;

  bist_top #(.NUM_PATTERNS(NP)) dut (
    .clk, .rst_n, .start, .tg_mode, .gold_ext_sel(1'b1), .gold_ext, .func_in(4'b0000),
    .func_out, .fault_en, .fault_net, .fault_val, .busy, .done, .pass, .signature);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // s27, net-level, with one optional stuck-at fault (net n forced to v)
  function automatic logic s27_step(input logic [3:0] x, inout logic [2:0] st,
                                    input int n, input logic v);
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
    st = {g[9], g[10], g[12]};
    return g[16];
  endfunction

  function automatic logic [15:0] model_signature(input int n, input logic v);
    logic [2:0] st = 3'b000;
    logic [16:0] sg = '0;
    for (int t = 0; t < NP; t++) begin
      logic [3:0] x;
      for (int j = 0; j < 4; j++) x[j] = (DET[t*4 + j] == "1");
      sg = {sg[15:0], 1'b0};
      if (sg[16]) sg ^= 17'h1002D;
      sg[0] ^= s27_step(x, st, n, v);
    end
    return sg[15:0];
  endfunction

  task automatic run_test(input int mode, output int cycles);
    tg_mode = mode[0];
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    cycles = 1;
    while (!done && cycles < 500) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 1'b0; start = 1'b0; tg_mode = 1'b0;
    fault_en = 1'b0; fault_net = '0; fault_val = 1'b0;
    gold_ext = model_signature(-1, 1'b0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int mode = 0; mode < 2; mode++) begin
      fault_en = 1'b0;
      run_test(mode, cyc);
      check(done && pass && signature == gold_ext, $sformatf("mode %0d fault-free", mode));
      check(cyc == (mode ? 3 + NP : 3 + (NP - 1) * 4 + 1), $sformatf("mode %0d latency %0d", mode, cyc));
      for (int n = 0; n < 17; n++)
        for (int v = 0; v < 2; v++) begin
          fault_en = 1'b1; fault_net = 5'(n); fault_val = v[0];
          run_test(mode, cyc);
          check(done && !pass, $sformatf("mode %0d fault net %0d sa%0d detected", mode, n, v));
          check(signature == model_signature(n, v[0]), $sformatf("mode %0d fault net %0d sa%0d signature", mode, n, v));
          if (done && !pass) detected++;
        end
    end
    $display("deterministic test alone: %0d of 68 fault runs detected", detected);
    check(detected == 68, "100% single stuck-at coverage from the deterministic part");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
