// s27_cut: circuit under test, the ISCAS'89 sequential benchmark s27.
//
// Four primary inputs G0..G3, one primary output G17 and three D
// flip-flops G5, G6, G7 (next states G10, G11, G13), with the gate netlist
//   G14 = NOT G0          G8  = AND(G14, G6)    G12 = NOR(G1, G7)
//   G15 = OR(G12, G8)     G16 = OR(G3, G8)      G9  = NAND(G16, G15)
//   G11 = NOR(G5, G9)     G10 = NOR(G14, G11)   G13 = NOR(G2, G12)
//   G17 = NOT G11
// G17 depends on the inputs and the present state in the same cycle.
//
// For demonstrating a faulty circuit a single stuck-at fault can be placed
// on any of the 17 nets: with fault_en high, net fault_net (bist_pkg
// s27_net_e numbering) is forced to fault_val for every gate and flip-flop
// that reads it. This port, the clock enable en (the flip-flops only load
// when en is high, so the BIST can step the circuit once per pattern) and
// the synchronous clear clr (all flip-flops to 0, the test start state)
// are this design's additions to the benchmark.
module s27_cut
  import bist_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic [S27_NUM_IN-1:0] pi,
  output logic                 po,
  input  logic                 fault_en,
  input  logic [NET_IDX_W-1:0] fault_net,
  input  logic                 fault_val
);

  logic g0, g1, g2, g3, g5, g6, g7, g8, g9, g10, g11, g12, g13, g14, g15, g16, g17;
  logic q5, q6, q7;

  // Apply the injected fault, if any, to one net
  function automatic logic fx(input logic v, input s27_net_e n);
    return (fault_en && (fault_net == n)) ? fault_val : v;
  endfunction

  always_comb begin
    g0  = fx(pi[0], NET_G0);
    g1  = fx(pi[1], NET_G1);
    g2  = fx(pi[2], NET_G2);
    g3  = fx(pi[3], NET_G3);
    g5  = fx(q5, NET_G5);
    g6  = fx(q6, NET_G6);
    g7  = fx(q7, NET_G7);
    g14 = fx(~g0, NET_G14);
    g8  = fx(g14 & g6, NET_G8);
    g12 = fx(~(g1 | g7), NET_G12);
    g15 = fx(g12 | g8, NET_G15);
    g16 = fx(g3 | g8, NET_G16);
    g9  = fx(~(g16 & g15), NET_G9);
    g11 = fx(~(g5 | g9), NET_G11);
    g10 = fx(~(g14 | g11), NET_G10);
    g13 = fx(~(g2 | g12), NET_G13);
    g17 = fx(~g11, NET_G17);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {q5, q6, q7} <= '0;
    end else if (clr) begin
      {q5, q6, q7} <= '0;
    end else if (en) begin
      q5 <= g10;
      q6 <= g11;
      q7 <= g13;
    end
  end

  assign po = g17;

endmodule
