// Final comparator: reduces the results of the row comparators to one and
// keeps the smallest over the whole search, reporting the minimum SAD found
// by all logical cores together with its position.
// A compare-select chain over the N_IN inputs feeds a running-minimum
// register; clear (at the start of a search) empties it. best follows the
// inputs by one cycle. Its place at the end of the comparator chains follows
// the source design; the tie rule (first found wins) is this design's own.
module final_comparator
  import sad_pkg::*;
#(
  parameter int unsigned N_IN = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  cand_t cand [N_IN],
  output cand_t best
);

  cand_t chain [N_IN+1];
  assign chain[0] = '0;
  for (genvar k = 0; k < N_IN; k++) begin : g_cell
    assign chain[k+1] = cand_min(chain[k], cand[k]);
  end

  min_tracker u_best (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(clear),
    .cand (chain[N_IN]),
    .best (best)
  );

endmodule
