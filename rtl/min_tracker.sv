// Running-minimum register: keeps the smallest valid SAD candidate seen since
// the last clear, with its position. A candidate replaces the stored one
// only if it is strictly smaller, so the first of equal SADs is kept.
// clear empties the register (best.valid = 0) and wins over a candidate in
// the same cycle. Timing: best reflects a candidate one cycle after it.
module min_tracker
  import sad_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  cand_t cand,
  output cand_t best
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) best <= '0;
    else                 best <= cand_min(best, cand);
  end

endmodule
