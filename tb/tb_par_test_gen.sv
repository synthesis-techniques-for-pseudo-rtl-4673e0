// tb_par_test_gen: self-checking testbench for the parallel generator.
//
// Uses the default (s27) configuration: four LFSRs, LFSR j reproducing
// column j (input Gj) of the deterministic s27 test. The reference columns
// are the deterministic test followed by each column's Berlekamp-Massey
// recurrence:
//   G0: 010100 , 1 + D^2 + D^4 (L = 4)   G1: 101000 , 1 (L = 3)
//   G2: 110101 , 1 + D^2      (L = 3)   G3: 110110 , 1 + D + D^2 (L = 2)
// Checked: a pattern on every clock, matching the reference, for 40
// clocks; en = 0 freezes; load restarts.
module tb_par_test_gen;

  localparam int P = 4;
  localparam int NPAT = 40;
  localparam int NDET = 6;

  logic clk = 1'b0;
  logic rst_n, load, en;
  logic [P-1:0] pattern;
  logic pattern_valid;
  int checks = 0, failures = 0;

  string cols [P] = '{"010100", "101000", "110101", "110110"};
  string polys[P] = '{"10101", "1000", "1010", "111"};   // c0 .. cL
  bit col[P][NPAT];

  always #5 clk = ~clk;

  par_test_gen dut (.clk, .rst_n, .load, .en, .pattern, .pattern_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < P; j++)
      for (int n = 0; n < NPAT; n++) begin
        if (n < NDET) col[j][n] = (cols[j][n] == "1");
        else begin
          col[j][n] = 1'b0;
          for (int i = 1; i < polys[j].len(); i++)
            if (polys[j][i] == "1") col[j][n] ^= col[j][n-i];
        end
      end

    rst_n = 1'b0; load = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    load = 1'b1;
    @(posedge clk); #1 load = 1'b0; en = 1'b1;
    for (int t = 0; t < NPAT; t++) begin
      logic [P-1:0] exp_pat;
      for (int j = 0; j < P; j++) exp_pat[j] = col[j][t];
      check(pattern_valid, "pattern offered every clock");
      check(pattern == exp_pat, $sformatf("pattern %0d: got %b expected %b", t, pattern, exp_pat));
      @(posedge clk); #1;
    end

    begin
      logic [P-1:0] hp;
      hp = pattern;
      en = 1'b0;
      repeat (5) @(posedge clk);
      #1 check(pattern == hp, "en = 0 freezes the generator");
    end

    en = 1'b1; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(pattern == 4'b1110, "load restarts at pattern 0");
    @(posedge clk); #1;
    check(pattern == 4'b1101, "second pattern after reload");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
