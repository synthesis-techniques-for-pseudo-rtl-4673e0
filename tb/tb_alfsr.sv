// tb_alfsr: self-checking testbench for the autonomous LFSR.
//
// Six LFSRs are built from published Berlekamp-Massey results (binary
// sequence -> minimal polynomial):
//   "001101110"            -> 1 + D^3 + D^5                      (L = 5)
//   "00101001001011"       -> 1 + D^4 + D^5 + D^6 + D^7          (L = 7)
//   "10110111000111010010" -> 1 + D^6 + D^8 + D^9 + D^10         (L = 10)
//   "001011110010"         -> 1 + D + D^6                        (L = 6)
//   "0010110100001101"     -> 1 + D + D^2 + D^3 + D^6 + D^9 + D^10 (L = 10)
//   "1011011100011101"     -> 1 + D + D^2 + D^3 + D^8            (L = 8)
// Each is seeded with the first L bits of its sequence. The testbench
// checks that the serial output reproduces the whole sequence, that it then
// follows the recurrence s[N] = sum c_i s[N-i] (reference computed here
// from the polynomial), that the primitive degree-5 LFSR has period exactly
// 31, that en = 0 holds the state and that load restarts the sequence.
module tb_alfsr;

  localparam int NEX = 6;
  localparam int W0 = 5, W1 = 7, W2 = 10;
  localparam int NCYC = 200;

  logic clk = 1'b0;
  logic rst_n, load, en;
  logic [NEX-1:0] obit;
  logic [W0-1:0] st0;
  logic [W1-1:0] st1;
  logic [W2-1:0] st2;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alfsr #(.WIDTH(W0), .TAPS(5'h05),  .SEED(5'h0C))  u0 (.clk, .rst_n, .load, .en, .state(st0), .out_bit(obit[0]));
  alfsr #(.WIDTH(W1), .TAPS(7'h0F),  .SEED(7'h14))  u1 (.clk, .rst_n, .load, .en, .state(st1), .out_bit(obit[1]));
  alfsr #(.WIDTH(W2), .TAPS(10'h017), .SEED(10'h0ED)) u2 (.clk, .rst_n, .load, .en, .state(st2), .out_bit(obit[2]));
  alfsr #(.WIDTH(6),  .TAPS(6'h21),   .SEED(6'h34))   u3 (.clk, .rst_n, .load, .en, .state(), .out_bit(obit[3]));
  alfsr #(.WIDTH(10), .TAPS(10'h393), .SEED(10'h0B4)) u4 (.clk, .rst_n, .load, .en, .state(), .out_bit(obit[4]));
  alfsr #(.WIDTH(8),  .TAPS(8'hE1),   .SEED(8'hED))   u5 (.clk, .rst_n, .load, .en, .state(), .out_bit(obit[5]));

  // Reference data, as printed for the Berlekamp-Massey examples
  string seqs [NEX] = '{"001101110", "00101001001011", "10110111000111010010",
                        "001011110010", "0010110100001101", "1011011100011101"};
  string polys[NEX] = '{"100101", "10001111", "10000010111",
                        "1100001", "11110010011", "111100001"};   // c0 .. cL
  int    lens [NEX] = '{5, 7, 10, 6, 10, 8};

  logic hist[NEX][NCYC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit ref_bit(input int k, input int n);
    bit r = 1'b0;
    if (n < seqs[k].len()) return seqs[k][n] == "1";
    for (int i = 1; i <= lens[k]; i++)
      if (polys[k][i] == "1") r ^= hist[k][n-i];
    return r;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W0-1:0] seed0;
    int            first_return;
    rst_n = 1'b0; load = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(st0 == 5'h0C && st1 == 7'h14 && st2 == 10'h0ED, "reset loads the seeds");
    seed0 = st0;
    first_return = -1;
    en = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      for (int k = 0; k < NEX; k++) begin
        hist[k][t] = obit[k];
        check(obit[k] == ref_bit(k, t),
              $sformatf("example %0d bit %0d: got %0b", k, t, obit[k]));
      end
      @(posedge clk); #1;
      if (first_return < 0 && st0 == seed0) first_return = t + 1;
    end
    check(first_return == 31, $sformatf("degree-5 primitive LFSR period %0d, expected 31", first_return));
    for (int t = 31; t < NCYC; t++) check(hist[0][t] == hist[0][t-31], "period-31 repetition");

    // Hold
    begin
      logic [W2-1:0] held;
      held = st2;
      en = 1'b0;
      repeat (5) @(posedge clk);
      #1 check(st2 == held, "en = 0 holds the register");
    end

    // Synchronous reload restarts the sequence
    load = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    check(st0 == 5'h0C && st1 == 7'h14 && st2 == 10'h0ED, "load restores the seeds");
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < NEX; k++) check(obit[k] == hist[k][t], "stream after reload");
      @(posedge clk); #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
