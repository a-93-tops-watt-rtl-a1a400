// Row comparator: a chain of compare-select cells along one row of logical
// cores. Cell k passes on the smaller of its own core's candidate and what
// arrives from cell k-1 (invalid candidates never win; a tie keeps the one
// from the lower index). The end of the chain is registered, so the row
// minimum appears one cycle after the candidates.
// The chain along a row follows the source design; its length, tie rule and
// output register are this design's own.
module row_comparator
  import sad_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cand_t cand [N_IN],
  output cand_t row_min
);

  cand_t chain [N_IN+1];
  assign chain[0] = '0;
  for (genvar k = 0; k < N_IN; k++) begin : g_cell
    assign chain[k+1] = cand_min(chain[k], cand[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) row_min <= '0;
    else        row_min <= chain[N_IN];
  end

endmodule
