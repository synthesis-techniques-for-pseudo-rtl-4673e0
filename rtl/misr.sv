// misr: multiple-input signature register (signature analyser).
//
// Compacts the circuit-under-test responses into a WIDTH-bit signature.
// Internal-XOR (Galois) form: on every enabled clock the register shifts
// one place towards the MSB, the bit shifted out is fed back through the
// characteristic polynomial POLY (x^WIDTH implied, POLY holds the lower
// coefficients, bit 0 = x^0), and the N_IN response bits are XORed into
// the low stages:
//   sig' = {sig[WIDTH-2:0], 0} ^ (sig[WIDTH-1] ? POLY : 0) ^ d
// With a primitive POLY an error pattern escapes detection (aliases) with a
// probability of about 2^-WIDTH. The width, the polynomial and the Galois
// form are this design's choices; the method only asks for an LFSR-based
// signature analyser.
//
// Interface: clr clears the signature synchronously (clr wins over en);
// en absorbs d in the same clock. sig is the register itself.
module misr #(
  parameter int unsigned      WIDTH = bist_pkg::MISR_WIDTH_DEF,
  parameter int unsigned      N_IN  = bist_pkg::S27_NUM_OUT,
  parameter logic [WIDTH-1:0] POLY  = bist_pkg::MISR_POLY_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N_IN-1:0]  d,
  output logic [WIDTH-1:0] sig
);

  if (N_IN > WIDTH || WIDTH < 2) begin : g_size_check
    $error("misr: need 2 <= WIDTH and N_IN <= WIDTH");
  end

  logic [WIDTH-1:0] next_sig;

  always_comb begin
    next_sig = {sig[WIDTH-2:0], 1'b0} ^ (sig[WIDTH-1] ? POLY : '0) ^ WIDTH'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= next_sig;
  end

endmodule
