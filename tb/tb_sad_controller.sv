// Testbench of sad_controller: for jobs in each mode it records every
// memory request and checks, against a schedule worked out here, the CU
// column reads, the search-area column reads (pass base rows y0 = G*g + j),
// the tags given to the data buffer, the result writes and their packing,
// the phase strobes, and the number of cycles from start to done:
// 1 (set) + N (load) + passes * W (compute) + 10 (drain) + results + 1.
module tb_sad_controller;
  import sad_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  cu_mode_e job_mode;
  addr_t job_cu_addr, job_cu_stride, job_sa_addr, job_sa_stride, job_res_addr;
  coord_t job_sa_w, job_sa_h;
  logic busy, done, mem_req, mem_we;
  addr_t mem_addr;
  word_t mem_wdata;
  logic fabric_set, grid_en, cmp_clear, req_load, req_comp;
  cu_mode_e mode;
  logic [4:0] req_col, res_idx;
  coord_t req_x, req_y0, max_x, max_y;
  cand_t res_cand;
  int checks = 0, failures = 0;

  sad_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result returned for a slot index
  always_comb begin
    res_cand.valid = res_idx[0];
    res_cand.sad   = 32'h1000 + 32'(res_idx);
    res_cand.mvx   = coord_t'(res_idx) + 10'd3;
    res_cand.mvy   = coord_t'(res_idx) + 10'd7;
  end

  typedef struct { logic we, ld, cp; addr_t a; logic [4:0] col; coord_t x, y0; } ev_t;
  ev_t log_q [$];
  int cyc, n_set, n_clear;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fabric_set) n_set++;
    if (cmp_clear) n_clear++;
    if (mem_req) begin
      ev_t e;
      e.we = mem_we; e.ld = req_load; e.cp = req_comp; e.a = mem_addr;
      e.col = req_col; e.x = req_x; e.y0 = req_y0;
      log_q.push_back(e);
      if (mem_we) begin
        checks++;
        if (mem_wdata[31:0] != 32'h1000 + 32'(res_idx) ||
            mem_wdata[47:32] != 16'(res_idx + 3) || mem_wdata[63:48] != 16'(res_idx + 7) ||
            mem_wdata[64] != res_idx[0] || mem_wdata[255:65] != '0) failures++;
      end
    end
  end

  task automatic run_job(cu_mode_e m, int w, int h, int cua, int cus, int saa, int sas, int ra);
    int n, g, base, j, y0, passes, t0, nres, idx;
    ev_t e;
    n = cu_size(m);
    g = (m == MODE_SPEC8) ? 28 : (m == MODE_SPEC16) ? 8 : 4;
    log_q.delete();
    n_set = 0; n_clear = 0;
    @(negedge clk);
    job_mode = m; job_cu_addr = addr_t'(cua); job_cu_stride = addr_t'(cus);
    job_sa_addr = addr_t'(saa); job_sa_stride = addr_t'(sas);
    job_sa_w = coord_t'(w); job_sa_h = coord_t'(h); job_res_addr = addr_t'(ra);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // expected schedule
    idx = 0;
    for (int c = 0; c < n; c++) begin
      e = log_q[idx++];
      checks++;
      if (e.we || !e.ld || e.a != addr_t'(cua + c * cus) || e.col != 5'(c)) failures++;
    end
    base = 0; j = 0; y0 = 0; passes = 0;
    while (y0 <= h - n) begin
      passes++;
      for (int x = 0; x < w; x++) begin
        e = log_q[idx++];
        checks++;
        if (e.we || !e.cp || e.a != addr_t'(saa + x * sas + y0) ||
            e.x != coord_t'(x) || e.y0 != coord_t'(y0)) begin
          failures++;
          if (failures < 10) $display("pass y0=%0d x=%0d: addr %0d", y0, x, e.a);
        end
      end
      if (j == 3) begin base += g; y0 = base; j = 0; end
      else begin y0++; j++; end
    end
    nres = (m == MODE_ALL) ? N_SLOTS : 1;
    for (int r = 0; r < nres; r++) begin
      e = log_q[idx++];
      checks++;
      if (!e.we || e.a != addr_t'(ra + 32 * r)) failures++;
    end
    checks++;
    if (idx != log_q.size()) failures++;
    checks++;
    if (n_set != 1 || n_clear != 1) failures++;
    checks++;
    if (cyc - t0 != 1 + 1 + n + passes * w + 10 + nres) begin
      failures++;
      $display("cycles %0d", cyc - t0);
    end
    checks++;
    if (max_x != coord_t'(w - n) || max_y != coord_t'(h - n)) failures++;
    $display("mode %s %0dx%0d: %0d passes, %0d cycles", m.name(), w, h, passes, cyc - t0);
  endtask

  initial begin
    cyc = 0;
    job_mode = MODE_ALL; job_cu_addr = 0; job_cu_stride = 0; job_sa_addr = 0;
    job_sa_stride = 0; job_sa_w = 0; job_sa_h = 0; job_res_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(MODE_ALL, 40, 36, 1000, 32, 5000, 64, 90000);
    run_job(MODE_SPEC16, 60, 60, 77, 40, 123457, 61, 4096);
    run_job(MODE_SPEC8, 60, 60, 0, 32, 300000, 64, 128);
    run_job(MODE_ALL, 60, 60, 0, 32, 8192, 64, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
