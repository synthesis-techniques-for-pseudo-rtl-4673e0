// par_test_gen: parallel test pattern generator, one LFSR per CUT input.
//
// Column j of the deterministic test (bit j of every pattern) is an
// independent bit sequence; the Berlekamp-Massey algorithm gives the
// shortest LFSR for each column, and LFSR j drives CUT input j from its
// serial output. All P LFSRs shift together, so a new pattern appears on
// every clock. The LFSRs share one register width WIDTH (the longest
// column LFSR); a shorter recurrence is embedded by placing its taps at the
// top of the window (see alfsr). After the deterministic patterns the
// LFSRs continue with their own, generally short, pseudo-random cycles.
//
// Interface: load reloads every LFSR with its seed; while en is high each
// LFSR shifts once per clock. pattern_valid is constantly high: every
// clock carries a pattern. TAPS[j] and SEEDS[j] belong to input j.
// The one-LFSR-per-bit organisation follows the method; the common width
// is this design's choice.
module par_test_gen #(
  parameter int unsigned                P     = bist_pkg::S27_NUM_IN,
  parameter int unsigned                WIDTH = bist_pkg::PAR_WIDTH,
  parameter logic [P-1:0][WIDTH-1:0]    TAPS  = bist_pkg::PAR_TAPS,
  parameter logic [P-1:0][WIDTH-1:0]    SEEDS = bist_pkg::PAR_SEEDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [P-1:0] pattern,
  output logic         pattern_valid
);

  for (genvar j = 0; j < P; j++) begin : g_lfsr
    logic [WIDTH-1:0] st;
    alfsr #(.WIDTH(WIDTH), .TAPS(TAPS[j]), .SEED(SEEDS[j])) u_lfsr (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (load),
      .en      (en),
      .state   (st),
      .out_bit (pattern[j])
    );
  end

  assign pattern_valid = 1'b1;

endmodule
