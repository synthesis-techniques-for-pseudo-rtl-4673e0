// tb_seq_test_gen: self-checking testbench for the sequential generator.
//
// Uses the default (s27) configuration. The reference is built here from
// the deterministic s27 test written as one bit string (patterns G0 first)
// and the Berlekamp-Massey polynomial of that string,
// C(D) = 1 + D^5 + D^6 + D^7 + D^8 + D^10 + D^11; bits past the string
// follow the recurrence. Checked: pattern_valid comes exactly once every
// P = 4 clocks starting right after load, each offered pattern equals the
// next 4 bits of the reference stream (the first six being the
// deterministic test), en = 0 freezes the generator, and load restarts it.
module tb_seq_test_gen;

  localparam int P = 4;
  localparam int NPAT = 80;
  localparam string DET = "011110110100101100010010";  // 6 patterns, G0 first
  localparam string CPOLY = "100001111011";           // c0 .. c11
  localparam int L = 11;

  logic clk = 1'b0;
  logic rst_n, load, en;
  logic [P-1:0] pattern;
  logic pattern_valid;
  int checks = 0, failures = 0;
  bit stream[NPAT*P];

  always #5 clk = ~clk;

  seq_test_gen dut (.clk, .rst_n, .load, .en, .pattern, .pattern_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npat, cyc, last_valid;
    for (int n = 0; n < NPAT*P; n++) begin
      if (n < DET.len()) stream[n] = (DET[n] == "1");
      else begin
        stream[n] = 1'b0;
        for (int i = 1; i <= L; i++) if (CPOLY[i] == "1") stream[n] ^= stream[n-i];
      end
    end

    rst_n = 1'b0; load = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    load = 1'b1;
    @(posedge clk); #1 load = 1'b0; en = 1'b1;
    npat = 0; cyc = 0; last_valid = -P;
    while (npat < NPAT) begin
      if (pattern_valid) begin
        logic [P-1:0] exp_pat;
        for (int j = 0; j < P; j++) exp_pat[j] = stream[npat*P + j];
        check(pattern == exp_pat, $sformatf("pattern %0d: got %b expected %b", npat, pattern, exp_pat));
        check(cyc - last_valid == P, $sformatf("pattern %0d after %0d clocks", npat, cyc - last_valid));
        last_valid = cyc;
        npat++;
      end
      @(posedge clk); #1 cyc++;
    end
    check(cyc == (NPAT-1)*P + 1, "one pattern per P clocks over the whole run");

    // en low: nothing moves
    begin
      logic [P-1:0] hp;
      logic hv;
      hp = pattern; hv = pattern_valid;
      en = 1'b0;
      repeat (7) @(posedge clk);
      #1 check(pattern == hp && pattern_valid == hv, "en = 0 freezes the generator");
    end

    // load restarts from the first deterministic pattern
    en = 1'b1; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(pattern_valid && pattern == 4'b1110, "load restarts at pattern 0 (G3..G0 = 1110)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
