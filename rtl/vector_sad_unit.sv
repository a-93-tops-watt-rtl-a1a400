// Vector SAD unit: one column engine of a 4x4 processing element.
//
// Each cycle it takes a 4-pixel reference column from the data bus and the
// 4-pixel CU column it holds, forms the sum of the four absolute differences
// and adds the partial SAD arriving from the previous column engine. The sum
// is registered, so a chain of these units builds a wider SAD kernel one
// column per cycle: the unit that holds CU column k sees reference column
// t while the partial SAD it adds covers reference columns t-k .. t-1.
//
// Interface: ref_col / cu_col are 4 packed pixels (pixel 0 in the low byte),
// psad_in the incoming partial SAD, psad_out the registered result.
// Timing: one cycle from inputs to psad_out; en = 0 holds the register.
// The structure (absolute difference per pixel, adder for the incoming
// partial SAD, pipelined output) follows the source design; the enable and
// the synchronous reset are this design's own.
module vector_sad_unit
  import sad_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  col4_t ref_col,
  input  col4_t cu_col,
  input  psad_t psad_in,
  output psad_t psad_out
);

  logic [PIX_W+1:0] col_sad;

  always_comb begin
    col_sad = '0;
    for (int i = 0; i < PE_DIM; i++) begin
      automatic pix_t r = ref_col[i*PIX_W +: PIX_W];
      automatic pix_t c = cu_col[i*PIX_W +: PIX_W];
      col_sad += (r > c) ? (PIX_W+2)'(r - c) : (PIX_W+2)'(c - r);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  psad_out <= '0;
    else if (en) psad_out <= psad_in + psad_t'(col_sad);
  end

endmodule
