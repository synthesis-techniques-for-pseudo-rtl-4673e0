// bist_controller: test controller of the self-test.
//
// A five-state machine:
//   IDLE  wait for start (the circuit under test runs functionally)
//   INIT  one cycle: reload the test generator seeds, clear the CUT
//         flip-flops and the MISR, load the gold register, clear the result
//   RUN   the test generator runs (tg_en); each cycle in which it offers a
//         pattern (pattern_valid) the pattern is applied: the CUT takes one
//         clock step and the MISR absorbs its response (apply). After
//         NUM_PATTERNS patterns the machine leaves RUN.
//   CMP   one cycle: the comparator compares signature and gold (cmp)
//   DONE  result valid; a new start begins another run
// test_mode is high in INIT and RUN, when the CUT inputs come from the
// test generator. With the sequential generator (one pattern per P clocks)
// RUN lasts (NUM_PATTERNS-1)*P + 1 clocks, with the parallel one
// NUM_PATTERNS clocks. The method names the controller but not its
// states; this sequencing is this design's choice.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = bist_pkg::NUM_PATTERNS_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic pattern_valid,
  output logic init,
  output logic tg_en,
  output logic apply,
  output logic cmp,
  output logic test_mode,
  output logic busy,
  output logic done
);

  localparam int unsigned CNT_W = $clog2(NUM_PATTERNS + 1);

  bist_state_e state, state_nx;
  logic [CNT_W-1:0] count;

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_IDLE: if (start) state_nx = ST_INIT;
      ST_INIT: state_nx = ST_RUN;
      ST_RUN:  if (apply && (count == CNT_W'(NUM_PATTERNS - 1))) state_nx = ST_CMP;
      ST_CMP:  state_nx = ST_DONE;
      ST_DONE: if (start) state_nx = ST_INIT;
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      count <= '0;
    end else begin
      state <= state_nx;
      if (state == ST_INIT)  count <= '0;
      else if (apply)        count <= count + 1'b1;
    end
  end

  assign init      = (state == ST_INIT);
  assign tg_en     = (state == ST_RUN);
  assign apply     = (state == ST_RUN) && pattern_valid;
  assign cmp       = (state == ST_CMP);
  assign test_mode = (state == ST_INIT) || (state == ST_RUN);
  assign busy      = (state == ST_INIT) || (state == ST_RUN) || (state == ST_CMP);
  assign done      = (state == ST_DONE);

  // The pattern count never passes the programmed test length
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CNT_W'(NUM_PATTERNS));
  // A run always goes RUN -> CMP -> DONE
  a_cmp_then_done: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_CMP) |=> (state == ST_DONE));

endmodule
