// SAD accelerator: controller, data buffer, compute grid and comparators.
//
// The controller reads the CU and then the search area from the near memory
// through one 32B port; the data buffer broadcasts each word to the PE rows
// of the compute grid; the grid's SAD candidates are filtered by comparators
// and the winners are written back to memory.
//
// Filtering: in the specific-CU modes every logical core's candidate goes
// along the comparator chain of its row (four rows of 8x8 cores, one row of
// 16x16 cores), and the final comparator keeps the overall minimum: one
// result. In all-CU mode each of the 16 8x8 sub-blocks, the 4 16x16
// sub-blocks and the 32x32 CU has its own running-minimum register: 21
// results, written to res_addr + 32*i in the order 8x8 (row-major), 16x16
// (row-major), 32x32.
//
// Interface: offload (start, job, busy, done), memory master port with read
// data one cycle after the request, and best, the final comparator's output
// (valid after done in the specific-CU modes).
// The block split follows the source design; the result ordering is this
// design's own.
module sad_accelerator
  import sad_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  cu_mode_e job_mode,
  input  addr_t    job_cu_addr,
  input  addr_t    job_cu_stride,
  input  addr_t    job_sa_addr,
  input  addr_t    job_sa_stride,
  input  coord_t   job_sa_w,
  input  coord_t   job_sa_h,
  input  addr_t    job_res_addr,
  output logic     busy,
  output logic     done,
  output cand_t    best,
  output logic     mem_req,
  output logic     mem_we,
  output addr_t    mem_addr,
  output word_t    mem_wdata,
  input  word_t    mem_rdata
);

  logic       fabric_set, grid_en, cmp_clear;
  logic       req_load, req_comp;
  logic [4:0] req_col, res_idx;
  coord_t     req_x, req_y0, max_x, max_y;
  cu_mode_e   ctl_mode, grid_mode;
  cand_t      res_cand;

  sad_controller u_ctrl (
    .clk, .rst_n, .start, .job_mode, .job_cu_addr, .job_cu_stride,
    .job_sa_addr, .job_sa_stride, .job_sa_w, .job_sa_h, .job_res_addr,
    .busy, .done, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .fabric_set, .mode(ctl_mode), .grid_en, .cmp_clear,
    .req_load, .req_comp, .req_col, .req_x, .req_y0, .max_x, .max_y,
    .res_idx, .res_cand
  );

  col4_t      bus [GRID];
  logic       src_write, tag_valid;
  logic [4:0] load_col;
  coord_t     tag_x, tag_y0;

  data_buffer u_dbuf (
    .clk, .rst_n, .mode(ctl_mode),
    .req_load, .req_comp, .req_col, .req_x, .req_y0,
    .rdata(mem_rdata),
    .bus, .src_write, .load_col, .tag_valid, .tag_x, .tag_y0
  );

  cand_t cand8 [N_SLOT8];
  cand_t cand16 [N_SLOT16];
  cand_t cand32;

  compute_grid u_grid (
    .clk, .rst_n, .en(grid_en), .fabric_set, .mode_in(ctl_mode),
    .src_write, .load_col, .bus, .tag_valid, .tag_x, .tag_y0,
    .max_x, .max_y, .mode(grid_mode), .cand8, .cand16, .cand32
  );

  // ---- specific-CU modes: row comparator chains and final comparator ----
  cand_t rc_in8 [4][4];
  cand_t rc_in16 [N_SLOT16];
  cand_t row_min [5];

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        rc_in8[i][j] = cand8[4*i+j];
        rc_in8[i][j].valid = cand8[4*i+j].valid && (grid_mode == MODE_SPEC8);
      end
    for (int q = 0; q < N_SLOT16; q++) begin
      rc_in16[q] = cand16[q];
      rc_in16[q].valid = cand16[q].valid && (grid_mode == MODE_SPEC16);
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_row8
    row_comparator #(.N_IN(4)) u_rc (
      .clk, .rst_n, .cand(rc_in8[i]), .row_min(row_min[i]));
  end
  row_comparator #(.N_IN(N_SLOT16)) u_rc16 (
    .clk, .rst_n, .cand(rc_in16), .row_min(row_min[4]));

  final_comparator #(.N_IN(5)) u_final (
    .clk, .rst_n, .clear(cmp_clear), .cand(row_min), .best);

  // ---- all-CU mode: one running minimum per sub-block ----
  cand_t slot_in [N_SLOTS];
  cand_t slot_best [N_SLOTS];

  always_comb begin
    for (int s = 0; s < N_SLOT8; s++)  slot_in[s] = cand8[s];
    for (int s = 0; s < N_SLOT16; s++) slot_in[N_SLOT8+s] = cand16[s];
    slot_in[N_SLOTS-1] = cand32;
    for (int s = 0; s < N_SLOTS; s++)
      slot_in[s].valid = slot_in[s].valid && (grid_mode == MODE_ALL);
  end

  for (genvar s = 0; s < N_SLOTS; s++) begin : g_slot
    min_tracker u_trk (
      .clk, .rst_n, .clear(cmp_clear), .cand(slot_in[s]), .best(slot_best[s]));
  end

  assign res_cand = (ctl_mode == MODE_ALL) ? slot_best[res_idx] : best;

endmodule
