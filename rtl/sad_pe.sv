// 4x4 SAD processing element (PE).
//
// The PE sees two 4-byte buses, the one above it and the one below it, and
// an input multiplexer (in_sel) picks the one it works on. During the load
// phase the selected 4 bytes are written into one of four CU column
// registers (16 bytes in all); the register bank is written only when
// src_write is high, standing in for the clock gating of the load flops.
// During the compute phase the four vector SAD units each compare the
// broadcast reference column with their CU column; they are chained, unit 0
// adding the partial SAD psad_in from a preceding PE, so psad_out at cycle T
// is the 4x4 SAD (plus psad_in) of the window ending with the reference
// column that was on the bus at cycle T-1.
//
// The output demultiplexer (out_sel) steers the result to the PE in the same
// row, the row above, the row below or the adder/comparator fabric; outputs
// not selected are zero so that a receiver may OR its sources.
//
// Timing: 4 cycles from a column on the bus to its contribution leaving the
// PE. Following the source design: input mux 8B->4B, 16B CU store, four
// pipelined column units, 32-bit "P" input, 4-way output demux. Reset, the
// column write index (src_col) and zeroing of unselected outputs are this
// design's own.
module sad_pe
  import sad_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,          // compute enable (pipeline advance)
  input  col4_t   bus_top,
  input  col4_t   bus_bot,
  input  logic    in_sel,      // 0: bus above, 1: bus below
  input  logic    src_write,   // load phase write strobe
  input  logic [1:0] src_col,  // which CU column is written
  input  psad_t   psad_in,     // partial SAD from the preceding PE
  input  pe_out_e out_sel,
  output psad_t   out_adj,
  output psad_t   out_top,
  output psad_t   out_bot,
  output psad_t   out_fabric
);

  col4_t data_in;
  col4_t cu_q [PE_DIM];
  psad_t chain [PE_DIM+1];
  psad_t result;

  assign data_in = in_sel ? bus_bot : bus_top;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < PE_DIM; k++) cu_q[k] <= '0;
    end else if (src_write) begin
      cu_q[src_col] <= data_in;
    end
  end

  assign chain[0] = psad_in;
  for (genvar k = 0; k < PE_DIM; k++) begin : g_unit
    vector_sad_unit u_vsad (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .ref_col (data_in),
      .cu_col  (cu_q[k]),
      .psad_in (chain[k]),
      .psad_out(chain[k+1])
    );
  end
  assign result = chain[PE_DIM];

  always_comb begin
    out_adj    = (out_sel == OUT_ADJ)    ? result : '0;
    out_top    = (out_sel == OUT_TOP)    ? result : '0;
    out_bot    = (out_sel == OUT_BOT)    ? result : '0;
    out_fabric = (out_sel == OUT_FABRIC) ? result : '0;
  end

endmodule
