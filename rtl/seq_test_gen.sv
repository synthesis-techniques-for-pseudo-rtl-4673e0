// seq_test_gen: sequential test pattern generator built from a single LFSR.
//
// The deterministic test (P-bit patterns t0, t1, ...) is written as one
// bit string t0[0..P-1] t1[0..P-1] ... and the LFSR produced by the
// Berlekamp-Massey algorithm regenerates that string one bit per shift.
// Because the register is a window over the string, pattern t is lying in
// state[P-1:0] exactly when t*P bits have been shifted out, so the pattern
// is taken straight from the first P stages every P-th shift; no separate
// serial-to-parallel register is needed (this requires WIDTH >= P, which
// holds whenever the LFSR is at least one pattern long). Once the
// deterministic part is exhausted the LFSR keeps running and the following
// patterns are pseudo-random.
//
// Interface: load restarts the LFSR from SEED and the phase counter from 0.
// While en is high the LFSR shifts once per clock; pattern_valid is high in
// the cycle where the phase is 0, i.e. one cycle in P, starting with the
// first cycle after load. The single-LFSR organisation follows the method;
// reading the pattern in parallel from the window is this design's choice.
module seq_test_gen #(
  parameter int unsigned      P     = bist_pkg::S27_NUM_IN,
  parameter int unsigned      WIDTH = bist_pkg::SEQ_WIDTH,
  parameter logic [WIDTH-1:0] TAPS  = bist_pkg::SEQ_TAPS,
  parameter logic [WIDTH-1:0] SEED  = bist_pkg::SEQ_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [P-1:0] pattern,
  output logic         pattern_valid
);

  if (WIDTH < P) begin : g_width_check
    $error("seq_test_gen: the LFSR must be at least one pattern wide");
  end

  localparam int unsigned PH_W = (P > 1) ? $clog2(P) : 1;

  logic [WIDTH-1:0] lfsr_state;
  logic             lfsr_out;
  logic [PH_W-1:0]  phase;

  alfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .en      (en),
    .state   (lfsr_state),
    .out_bit (lfsr_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (load) phase <= '0;
    else if (en)   phase <= (phase == PH_W'(P - 1)) ? '0 : phase + 1'b1;
  end

  assign pattern       = lfsr_state[P-1:0];
  assign pattern_valid = (phase == '0);

endmodule
