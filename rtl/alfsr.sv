// alfsr: autonomous linear feedback shift register (no data input).
//
// The stages selected by TAPS are summed modulo 2 (XOR) and the sum is fed
// into the register input, as in the classic external-XOR (Fibonacci)
// structure described by the characteristic polynomial
// C(D) = 1 + c_1 D + ... + c_L D^L. The register is a sliding window over
// the generated bit stream: state[0] is the oldest bit and is also the
// serial output, each shift drops it and appends the feedback bit at
// state[WIDTH-1]. With TAPS[WIDTH-i] = c_i the stream obeys
// s[N] = c_1 s[N-1] + ... + c_L s[N-L] (mod 2), and SEED holds its first
// WIDTH bits (SEED[j] = s[j]). A polynomial whose top coefficient is 0
// simply leaves TAPS[0] clear: the last stage is then a plain delay stage.
// An all-zero seed keeps the register at zero forever.
//
// Interface: rst_n (asynchronous) and load (synchronous) both put SEED in
// the register; en advances it by one shift per clock. load wins over en.
// The structure follows the autonomous LFSR of the method; the window/tap
// encoding and the reset/load behaviour are this design's choices.
module alfsr #(
  parameter int unsigned      WIDTH = bist_pkg::SEQ_WIDTH,
  parameter logic [WIDTH-1:0] TAPS  = bist_pkg::SEQ_TAPS,
  parameter logic [WIDTH-1:0] SEED  = bist_pkg::SEQ_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state,
  output logic             out_bit
);

  if (WIDTH < 2) begin : g_width_check
    $error("alfsr: WIDTH must be at least 2");
  end

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= SEED;
    else if (load)  state <= SEED;
    else if (en)    state <= {feedback, state[WIDTH-1:1]};
  end

  assign out_bit = state[0];

endmodule
