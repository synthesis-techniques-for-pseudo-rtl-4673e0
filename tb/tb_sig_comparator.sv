// tb_sig_comparator: self-checking testbench for the signature comparator.
//
// Random signature/gold pairs, equal about half of the time and otherwise
// differing in a single random bit, are compared; pass must equal the
// reference equality one clock after cmp, valid must rise with it, both
// must hold without cmp and clear on clr.
module tb_sig_comparator;

  logic clk = 1'b0;
  logic rst_n, clr, cmp;
  logic [15:0] sig, gold;
  logic pass, valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sig_comparator dut (.clk, .rst_n, .clr, .cmp, .sig, .gold, .pass, .valid);

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
    rst_n = 1'b0; clr = 1'b0; cmp = 1'b0; sig = '0; gold = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!valid && !pass, "reset");
    for (int i = 0; i < 200; i++) begin
      bit same;
      same = 1'($urandom);
      sig  = 16'($urandom);
      gold = same ? sig : sig ^ (16'd1 << $urandom_range(0, 15));
      clr = 1'b1;
      @(posedge clk); #1 clr = 1'b0;
      check(!valid && !pass, "clr clears the result");
      cmp = 1'b1;
      @(posedge clk); #1 cmp = 1'b0;
      check(valid, "valid after cmp");
      check(pass == same, $sformatf("pass %0b for sig %h gold %h", pass, sig, gold));
      sig = ~sig;
      @(posedge clk); #1;
      check(valid && pass == same, "result held without cmp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
