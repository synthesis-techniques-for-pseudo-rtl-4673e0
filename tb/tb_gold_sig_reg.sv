// tb_gold_sig_reg: self-checking testbench for the gold-signature register.
//
// Checks the reset value, the internal value picked by the generator mode,
// the external value when selected, and that nothing changes without load.
// Expected values are the fault-free signatures of the default test
// (16'hFC5A sequential, 16'h8413 parallel).
module tb_gold_sig_reg;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n, load, ext_sel;
  tg_mode_e tg_mode;
  logic [15:0] ext_gold, gold;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gold_sig_reg dut (.clk, .rst_n, .load, .tg_mode, .ext_sel, .ext_gold, .gold);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (gold = %h)", what, gold);
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
    rst_n = 1'b0; load = 1'b0; ext_sel = 1'b0; tg_mode = TG_PARALLEL; ext_gold = 16'h1234;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(gold == 16'hFC5A, "reset value");
    @(posedge clk); #1;
    check(gold == 16'hFC5A, "no change without load");
    load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(gold == 16'h8413, "internal gold, parallel generator");
    tg_mode = TG_SEQUENTIAL; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(gold == 16'hFC5A, "internal gold, sequential generator");
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      ext_gold = v; ext_sel = 1'b1; load = 1'b1;
      @(posedge clk); #1 load = 1'b0;
      check(gold == v, "external gold captured");
      ext_gold = ~v;
      @(posedge clk); #1;
      check(gold == v, "external gold held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
