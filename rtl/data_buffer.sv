// Data buffer: holds the 32-byte word read from the near memory and
// broadcasts it to the PE rows as eight 4-byte buses (bus k carries pixels
// 4k..4k+3 of the column segment, pixel 0 in the low byte).
//
// The request tag (load or compute, CU column, column index, pass base row)
// is captured when the controller issues the read, so that it lines up with
// the read data one cycle later; the word and its tag are then registered
// together and held until the next word. For a load in the specific-CU
// modes the buffer replicates the CU column: bus k carries chunk
// k mod (N/4), so every logical core finds its rows on the bus above it.
//
// Timing: read issued at cycle t, data from memory at t+1, buses valid at
// t+2. Broadcasting 4B chunks to PE rows follows the source design; the
// replication for loading and the tag path are this design's own.
module data_buffer
  import sad_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cu_mode_e mode,
  // request tag, presented with the memory read
  input  logic     req_load,
  input  logic     req_comp,
  input  logic [4:0] req_col,
  input  coord_t   req_x,
  input  coord_t   req_y0,
  // read data, one cycle after the request
  input  word_t    rdata,
  // broadcast
  output col4_t    bus [GRID],
  output logic     src_write,
  output logic [4:0] load_col,
  output logic     tag_valid,
  output coord_t   tag_x,
  output coord_t   tag_y0
);

  logic       t_load, t_comp;
  logic [4:0] t_col;
  coord_t     t_x, t_y0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_load <= 1'b0;
      t_comp <= 1'b0;
      t_col  <= '0;
      t_x    <= '0;
      t_y0   <= '0;
    end else begin
      t_load <= req_load;
      t_comp <= req_comp;
      t_col  <= req_col;
      t_x    <= req_x;
      t_y0   <= req_y0;
    end
  end

  int unsigned rep;
  always_comb begin
    case (mode)
      MODE_SPEC8:  rep = 2;
      MODE_SPEC16: rep = 4;
      default:     rep = GRID;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < GRID; k++) bus[k] <= '0;
      src_write <= 1'b0;
      load_col  <= '0;
      tag_valid <= 1'b0;
      tag_x     <= '0;
      tag_y0    <= '0;
    end else begin
      if (t_load || t_comp) begin
        for (int k = 0; k < GRID; k++)
          bus[k] <= t_load ? rdata[(k % rep)*32 +: 32] : rdata[k*32 +: 32];
      end
      src_write <= t_load;
      load_col  <= t_col;
      tag_valid <= t_comp;
      tag_x     <= t_x;
      tag_y0    <= t_y0;
    end
  end

endmodule
