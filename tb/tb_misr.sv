// tb_misr: self-checking testbench for the signature register.
//
// Two instances: the default one (16 bits, x^16+x^5+x^3+x^2+1, one input)
// and a 3-input 8-bit one (x^8+x^4+x^3+x^2+1). The reference treats the
// register as a polynomial over GF(2): each step multiplies the signature
// by x modulo the characteristic polynomial (computed here by explicit
// polynomial reduction of a 2*WIDTH-bit product) and adds the inputs.
// Also checked: hold when en = 0, clr, linearity (the signature of a XOR of
// two streams is the XOR of their signatures) and that every single-bit
// error in a 64-bit stream changes the signature.
module tb_misr;

  logic clk = 1'b0;
  logic rst_n, clr, en;
  logic d1;
  logic [2:0] d3;
  logic [15:0] sig16;
  logic [7:0] sig8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr dut16 (.clk, .rst_n, .clr, .en, .d(d1), .sig(sig16));
  misr #(.WIDTH(8), .N_IN(3), .POLY(8'h1D)) dut8 (.clk, .rst_n, .clr, .en, .d(d3), .sig(sig8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // (s * x) mod p, p given with its leading term, by long division
  function automatic logic [31:0] mulx_mod(input logic [31:0] s, input logic [32:0] p, input int w);
    logic [32:0] t;
    t = {s, 1'b0};
    for (int b = 32; b >= w; b--)
      if (t[b]) t ^= (p << (b - w));
    return t[31:0];
  endfunction

  // Signature of a 64-bit single-input stream with the 16-bit polynomial
  function automatic logic [15:0] sig_of(input logic [63:0] stream);
    logic [31:0] s = '0;
    for (int t = 0; t < 64; t++) s = mulx_mod(s, 33'h1002D, 16) ^ 32'(stream[t]);
    return s[15:0];
  endfunction

  task automatic run_stream(input logic [63:0] stream, output logic [15:0] result);
    clr = 1'b1; en = 1'b0;
    @(posedge clk); #1 clr = 1'b0; en = 1'b1;
    for (int t = 0; t < 64; t++) begin
      d1 = stream[t]; d3 = '0;
      @(posedge clk); #1;
    end
    en = 1'b0;
    result = sig16;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r16, r8;
    logic [63:0] a, b;
    logic [15:0] sa, sb, sab, se;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; d1 = 1'b0; d3 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(sig16 == '0 && sig8 == '0, "reset clears");

    // Random streams against the polynomial reference
    en = 1'b1; r16 = '0; r8 = '0;
    for (int t = 0; t < 300; t++) begin
      d1 = 1'($urandom); d3 = 3'($urandom);
      @(posedge clk); #1;
      r16 = mulx_mod(r16, 33'h1002D, 16) ^ 32'(d1);
      r8  = mulx_mod(r8, 33'h11D, 8) ^ 32'(d3);
      check(sig16 == r16[15:0], $sformatf("16-bit step %0d", t));
      check(sig8 == r8[7:0], $sformatf("8-bit step %0d", t));
    end

    // Hold
    en = 1'b0; d1 = 1'b1; d3 = 3'b111;
    repeat (3) @(posedge clk);
    #1 check(sig16 == r16[15:0] && sig8 == r8[7:0], "en = 0 holds");

    // Stream signatures, linearity and single-error detection
    a = {$urandom, $urandom}; b = {$urandom, $urandom};
    run_stream(a, sa);
    check(sa == sig_of(a), "signature of stream a");
    run_stream(b, sb);
    run_stream(a ^ b, sab);
    check(sab == (sa ^ sb), "linearity");
    for (int e = 0; e < 64; e += 7) begin
      run_stream(a ^ (64'd1 << e), se);
      check(se != sa, $sformatf("single error at bit %0d detected", e));
    end

    clr = 1'b1; en = 1'b1;
    @(posedge clk); #1 clr = 1'b0; en = 1'b0;
    check(sig16 == '0 && sig8 == '0, "clr wins over en");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
