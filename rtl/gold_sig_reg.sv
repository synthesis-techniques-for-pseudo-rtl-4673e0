// gold_sig_reg: register holding the gold (fault-free) signature.
//
// The gold signature is either internal, a constant built into the design
// for each test generator (GOLD_SEQ for the sequential and GOLD_PAR for the
// parallel generator, since they produce different pseudo-random
// continuations), or external, supplied on ext_gold. On load the register
// captures ext_gold when ext_sel is high, otherwise the internal value
// selected by tg_mode. Reset loads GOLD_SEQ.
// The choice between internal and external gold follows the method; the
// per-generator constants and the load timing are this design's choices.
module gold_sig_reg
  import bist_pkg::*;
#(
  parameter int unsigned      WIDTH    = MISR_WIDTH_DEF,
  parameter logic [WIDTH-1:0] GOLD_SEQ = bist_pkg::GOLD_SEQ_DEF,
  parameter logic [WIDTH-1:0] GOLD_PAR = bist_pkg::GOLD_PAR_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  tg_mode_e         tg_mode,
  input  logic             ext_sel,
  input  logic [WIDTH-1:0] ext_gold,
  output logic [WIDTH-1:0] gold
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gold <= GOLD_SEQ;
    end else if (load) begin
      if (ext_sel)                     gold <= ext_gold;
      else if (tg_mode == TG_PARALLEL) gold <= GOLD_PAR;
      else                             gold <= GOLD_SEQ;
    end
  end

endmodule
