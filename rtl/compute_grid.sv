// Compute grid: 8x8 mesh of 4x4 PEs with the reconfigurable fabric.
//
// Data: PE row r sees bus r above it and bus r+1 below it (row 7 has no bus
// below and sees bus 7 on both inputs). The fabric setting, latched by
// fabric_set, picks for every PE its input bus and its output target.
//
// Clustering. Two PEs of a row are daisy chained (the even one feeds the odd
// one through its "adjacent" output), giving an 8-wide, 4-tall strip SAD. An
// adder per 2x2 PE group sums the strips of its two rows into an 8x8 SAD.
// Adders one level up sum four 8x8 SADs into a 16x16 SAD, and the top adder
// sums four 16x16 SADs into a 32x32 SAD; the left operands pass through
// delay lines of 8 and 16 columns because the right-hand sub-block finishes
// that many reference columns later. The mode decides how the groups are
// read:
//   MODE_ALL    every PE takes the bus above it; each 8x8 group, each 16x16
//               quadrant and the whole grid hold the matching part of one
//               32x32 CU, so 16 + 4 + 1 SADs come out for every position.
//   MODE_SPEC16 each 16x16 quadrant is a logical core holding the whole
//               16x16 CU; the right quadrants take the bus below, so the
//               cores look at rows 0, 4, 16 (and 20, out of range) of the
//               32-row column.
//   MODE_SPEC8  each 2x2 group is a logical core holding the whole 8x8 CU;
//               odd core columns take the bus below, giving windows at rows
//               0, 4, 8, ... 24 of the column.
//
// Load: with src_write high, column load_col of the CU (as replicated by the
// data buffer onto the buses) is written into the PEs of CU-column
// load_col/4 of every core.
//
// Tags: tag_valid/tag_x/tag_y0 travel with the bus word (column index and
// first row of the column). cand8/cand16/cand32 carry each SAD with the CU
// position it belongs to, valid only when the window lies wholly inside the
// current column pass and the position is within max_x/max_y.
// Timing: a column on the bus at cycle T has its 8x8 results at T+2, 16x16
// at T+3 and 32x32 at T+4 (outputs are combinational from those registers).
//
// From the source design: 8x8 PE mesh, 2:1 input bus mux, output demux to
// adjacent/top/bottom PE or adder/comparator, adders passing results on to
// bigger adders or to comparators, the two modes. The fixed pair chaining,
// delay-line alignment, bus assignment and tag logic are this design's own.
module compute_grid
  import sad_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  // set stage
  input  logic     fabric_set,
  input  cu_mode_e mode_in,
  // load stage
  input  logic     src_write,
  input  logic [4:0] load_col,
  // data and tag of the column on the buses
  input  col4_t    bus [GRID],
  input  logic     tag_valid,
  input  coord_t   tag_x,
  input  coord_t   tag_y0,
  input  coord_t   max_x,
  input  coord_t   max_y,
  output cu_mode_e mode,
  output cand_t    cand8  [N_SLOT8],
  output cand_t    cand16 [N_SLOT16],
  output cand_t    cand32
);

  // ---------------- fabric setting ----------------
  logic    in_sel_q  [GRID][GRID];
  pe_out_e out_sel_q [GRID][GRID];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode <= MODE_ALL;
      for (int r = 0; r < GRID; r++)
        for (int c = 0; c < GRID; c++) begin
          in_sel_q[r][c]  <= 1'b0;
          out_sel_q[r][c] <= OUT_ADJ;
        end
    end else if (fabric_set) begin
      mode <= mode_in;
      for (int r = 0; r < GRID; r++)
        for (int c = 0; c < GRID; c++) begin
          case (mode_in)
            MODE_SPEC8:  in_sel_q[r][c] <= 1'((c / 2) % 2);
            MODE_SPEC16: in_sel_q[r][c] <= 1'((c / 4) % 2);
            default:     in_sel_q[r][c] <= 1'b0;
          endcase
          out_sel_q[r][c] <= (c % 2 == 0) ? OUT_ADJ : OUT_FABRIC;
        end
    end
  end

  // CU width of a logical core in PEs
  logic [3:0] core_w;
  always_comb begin
    case (mode)
      MODE_SPEC8:  core_w = 4'd2;
      MODE_SPEC16: core_w = 4'd4;
      default:     core_w = 4'd8;
    endcase
  end

  // ---------------- PE mesh ----------------
  psad_t o_adj [GRID][GRID];
  psad_t o_top [GRID][GRID];
  psad_t o_bot [GRID][GRID];
  psad_t o_fab [GRID][GRID];

  for (genvar r = 0; r < GRID; r++) begin : g_row
    for (genvar c = 0; c < GRID; c++) begin : g_col
      psad_t p_in;
      logic  wr;
      always_comb begin
        p_in = '0;
        if (c > 0)      p_in |= o_adj[r][(c > 0) ? c-1 : 0];
        if (r < GRID-1) p_in |= o_top[(r < GRID-1) ? r+1 : r][c];
        if (r > 0)      p_in |= o_bot[(r > 0) ? r-1 : 0][c];
      end
      assign wr = src_write && ((4'(c) % core_w) == 4'(load_col[4:2]));
      // A PE takes its partial SAD from at most one neighbour.
      logic [1:0] n_src;
      always_comb begin
        n_src = '0;
        if (c > 0)      n_src += 2'(out_sel_q[r][(c > 0) ? c-1 : 0] == OUT_ADJ);
        if (r < GRID-1) n_src += 2'(out_sel_q[(r < GRID-1) ? r+1 : r][c] == OUT_TOP);
        if (r > 0)      n_src += 2'(out_sel_q[(r > 0) ? r-1 : 0][c] == OUT_BOT);
      end
      a_one_source: assert property (@(posedge clk) disable iff (!rst_n) n_src <= 2'd1);
      sad_pe u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (en),
        .bus_top   (bus[r]),
        .bus_bot   (bus[(r < GRID-1) ? r+1 : r]),
        .in_sel    (src_write ? 1'b0 : in_sel_q[r][c]),
        .src_write (wr),
        .src_col   (load_col[1:0]),
        .psad_in   (p_in),
        .out_sel   (out_sel_q[r][c]),
        .out_adj   (o_adj[r][c]),
        .out_top   (o_top[r][c]),
        .out_bot   (o_bot[r][c]),
        .out_fabric(o_fab[r][c])
      );
    end
  end

  // ---------------- adder tree ----------------
  psad_t s8_q  [4][4];   // [group row][group col]
  psad_t s16_q [2][2];
  psad_t s32_q;
  psad_t s8_dl  [4][4];  // s8 delayed by 8 columns
  psad_t s16_dl [2][2];  // s16 delayed by 16 columns

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s8_q[i][j] <= '0;
    end else if (en) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          s8_q[i][j] <= o_fab[2*i][2*j]   + o_fab[2*i][2*j+1]
                      + o_fab[2*i+1][2*j] + o_fab[2*i+1][2*j+1];
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_dl8r
    for (genvar j = 0; j < 4; j++) begin : g_dl8c
      if (j % 2 == 0) begin : g_left
        delay_line #(.WIDTH(PSAD_W), .DEPTH(8)) u_dl (
          .clk(clk), .rst_n(rst_n), .en(en), .d(s8_q[i][j]), .q(s8_dl[i][j]));
      end else begin : g_right
        assign s8_dl[i][j] = s8_q[i][j];
      end
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_dl16r
    for (genvar j = 0; j < 2; j++) begin : g_dl16c
      if (j == 0) begin : g_left
        delay_line #(.WIDTH(PSAD_W), .DEPTH(16)) u_dl (
          .clk(clk), .rst_n(rst_n), .en(en), .d(s16_q[i][j]), .q(s16_dl[i][j]));
      end else begin : g_right
        assign s16_dl[i][j] = s16_q[i][j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) s16_q[i][j] <= '0;
      s32_q <= '0;
    end else if (en) begin
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          s16_q[i][j] <= s8_dl[2*i][2*j]   + s8_dl[2*i][2*j+1]
                       + s8_dl[2*i+1][2*j] + s8_dl[2*i+1][2*j+1];
      s32_q <= s16_dl[0][0] + s16_dl[0][1] + s16_dl[1][0] + s16_dl[1][1];
    end
  end

  // ---------------- tag pipeline ----------------
  typedef struct packed {
    logic   valid;
    coord_t x;
    coord_t y0;
  } tag_t;

  tag_t tag_p [1:4];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= 4; k++) tag_p[k] <= '0;
    end else if (en) begin
      tag_p[1] <= '{valid: tag_valid, x: tag_x, y0: tag_y0};
      for (int k = 2; k <= 4; k++) tag_p[k] <= tag_p[k-1];
    end
  end

  // Candidate for a window whose last column is t.x and which ends xoff
  // columns after the CU's left edge, lying yoff rows below the pass base.
  function automatic cand_t make_cand(tag_t t, psad_t s, coord_t xoff,
                                      coord_t yoff, logic allow,
                                      coord_t mx, coord_t my);
    cand_t c;
    c.sad   = s;
    c.mvx   = t.x - xoff;
    c.mvy   = t.y0 + yoff;
    c.valid = allow && t.valid && (t.x >= xoff) &&
              (c.mvx <= mx) && (c.mvy <= my);
    return c;
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        if (mode == MODE_SPEC8)
          cand8[4*i+j] = make_cand(tag_p[2], s8_q[i][j], 7, coord_t'(4*(2*i + (j % 2))),
                                   !(i == 3 && (j % 2) == 1), max_x, max_y);
        else
          cand8[4*i+j] = make_cand(tag_p[2], s8_q[i][j], coord_t'(8*j + 7), 0,
                                   mode == MODE_ALL, max_x, max_y);
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        if (mode == MODE_SPEC16)
          cand16[2*i+j] = make_cand(tag_p[3], s16_q[i][j], 15, coord_t'(4*(4*i + j)),
                                    !(i == 1 && j == 1), max_x, max_y);
        else
          cand16[2*i+j] = make_cand(tag_p[3], s16_q[i][j], coord_t'(16*j + 15), 0,
                                    mode == MODE_ALL, max_x, max_y);
      end
    cand32 = make_cand(tag_p[4], s32_q, 31, 0, mode == MODE_ALL, max_x, max_y);
  end

endmodule
