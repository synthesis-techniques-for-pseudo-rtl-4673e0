// sig_comparator: compares the final signature with the gold signature.
//
// On cmp the equality of sig and gold is registered into pass and valid is
// set; clr (start of a new test) clears both. The result therefore appears
// one clock after cmp and is held until the next clear. A registered result
// is this design's choice; the method only names the comparator.
module sig_comparator #(
  parameter int unsigned WIDTH = bist_pkg::MISR_WIDTH_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             cmp,
  input  logic [WIDTH-1:0] sig,
  input  logic [WIDTH-1:0] gold,
  output logic             pass,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (clr) begin
      pass  <= 1'b0;
      valid <= 1'b0;
    end else if (cmp) begin
      pass  <= (sig == gold);
      valid <= 1'b1;
    end
  end

endmodule
