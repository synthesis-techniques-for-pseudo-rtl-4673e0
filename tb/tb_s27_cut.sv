// tb_s27_cut: self-checking testbench for the s27 circuit under test.
//
// A reference model of s27, written here as sum-of-products next-state and
// output equations derived from the benchmark netlist, is stepped alongside
// the circuit with random inputs and random clock enables; G17 and the
// three flip-flops are compared every cycle. Then every one of the 34
// single stuck-at faults is injected while a fault-aware reference (net by
// net evaluation) runs, and a few hand-worked vectors are checked, e.g.
// from the cleared state, G0 = 1 sets G5 (G10 = 1).
module tb_s27_cut;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n, en, clr;
  logic [3:0] pi;
  logic po;
  logic fault_en, fault_val;
  logic [4:0] fault_net;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s27_cut dut (.clk, .rst_n, .en, .clr, .pi, .po, .fault_en, .fault_net, .fault_val);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Fault-free s27 in flattened form. st = {G5, G6, G7}.
  // G11 = ~G5 & G16 & G15, with G16 = G3 | (~G0 & G6) and
  // G15 = (~G1 & ~G7) | (~G0 & G6).
  function automatic void ref_clean(input logic [3:0] x, input logic [2:0] st,
                                    output logic y, output logic [2:0] nst);
    logic g5, g6, g7, a, g11, g12;
    {g5, g6, g7} = st;
    a   = ~x[0] & g6;
    g12 = ~x[1] & ~g7;
    g11 = ~g5 & (x[3] | a) & (g12 | a);
    y   = ~g11;
    nst = {x[0] & ~g11, g11, ~x[2] & ~g12};
  endfunction

  // Net-by-net s27 with one optional stuck-at fault (net index n, value v)
  function automatic void ref_fault(input logic [3:0] x, input logic [2:0] st,
                                    input int n, input logic v,
                                    output logic y, output logic [2:0] nst);
    logic [16:0] g;  // indexed like the fault-site numbering
    g = '0;
    for (int i = 0; i < 17; i++) begin
      case (i)
        0, 1, 2, 3: g[i] = x[i];
        4: g[i] = st[2];           // G5
        5: g[i] = st[1];           // G6
        6: g[i] = st[0];           // G7
        13: g[i] = ~g[0];          // G14
        default: g[i] = 1'b0;
      endcase
      if (i <= 6 || i == 13) if (i == n) g[i] = v;
    end
    // evaluation in dependency order: G8, G12, G15, G16, G9, G11, G10, G13, G17
    g[7]  = g[13] & g[5];           if (n == 7)  g[7]  = v;
    g[11] = ~(g[1] | g[6]);         if (n == 11) g[11] = v;
    g[14] = g[11] | g[7];           if (n == 14) g[14] = v;
    g[15] = g[3] | g[7];            if (n == 15) g[15] = v;
    g[8]  = ~(g[15] & g[14]);       if (n == 8)  g[8]  = v;
    g[10] = ~(g[4] | g[8]);         if (n == 10) g[10] = v;
    g[9]  = ~(g[13] | g[10]);       if (n == 9)  g[9]  = v;
    g[12] = ~(g[2] | g[11]);        if (n == 12) g[12] = v;
    g[16] = ~g[10];                 if (n == 16) g[16] = v;
    y   = g[16];
    nst = {g[9], g[10], g[12]};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] st, nst, st_f;
    logic y, y_f;
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; pi = '0;
    fault_en = 1'b0; fault_net = '0; fault_val = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Hand-worked: cleared state, inputs 0000 -> G17 = 1, next state 0,0,1
    #1 check(po == 1'b1, "G17 from state 000 with inputs 0000");
    pi = 4'b0001;  // G0 = 1: G10 = NOR(G14, G11) = 1
    en = 1'b1;
    #1 check(po == 1'b1, "G17 from state 000 with G0 = 1");
    @(posedge clk); #1;
    check({dut.q5, dut.q6, dut.q7} == 3'b100, "G5 set after G0 = 1");

    // Random stepping against the flattened model
    st = {dut.q5, dut.q6, dut.q7};
    for (int t = 0; t < 500; t++) begin
      pi = 4'($urandom);
      en = ($urandom_range(0, 3) != 0);
      #1;
      ref_clean(pi, st, y, nst);
      check(po == y, $sformatf("cycle %0d G17", t));
      @(posedge clk); #1;
      if (en) st = nst;
      check({dut.q5, dut.q6, dut.q7} == st, $sformatf("cycle %0d state", t));
    end

    // clr
    clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    check({dut.q5, dut.q6, dut.q7} == 3'b000, "clr clears the flip-flops");

    // Every single stuck-at fault
    en = 1'b1;
    for (int n = 0; n < 17; n++) begin
      for (int v = 0; v < 2; v++) begin
        fault_en = 1'b1; fault_net = 5'(n); fault_val = v[0];
        clr = 1'b1;
        @(posedge clk); #1 clr = 1'b0;
        st_f = 3'b000;
        for (int t = 0; t < 24; t++) begin
          pi = 4'($urandom);
          #1;
          ref_fault(pi, st_f, n, v[0], y_f, nst);
          check(po == y_f, $sformatf("fault net %0d sa%0d cycle %0d G17", n, v, t));
          @(posedge clk); #1;
          st_f = nst;
          check({dut.q5, dut.q6, dut.q7} == st_f, $sformatf("fault net %0d sa%0d cycle %0d state", n, v, t));
        end
      end
    end
    fault_en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
