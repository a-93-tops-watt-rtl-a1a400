// Workload testbench: runs the search sizes the accelerator is evaluated
// with, on nmc_subsystem at its default size, and checks results and cycle
// counts.
//   - one 32x32 CU in a 60x60 search area (all-CU mode), against the 4K
//     30 fps budget of 2057 cycles per 32x32 LCU at 500 MHz
//   - one 16x16 and one 8x8 CU in a 60x60 area (specific-CU modes)
//   - one 32x32 CU in a 36x36 area, one 8x8 CU in a 128x128 area
// The host fills the SRAM (column stride 128 bytes), offloads, waits for
// done and reads the results; every result must be the brute-force
// minimum. Cycle counts must equal 2 + N + passes*W + 10 + results.
module tb_workloads;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  addr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  logic host_grant;
  logic start = 0;
  cu_mode_e job_mode = MODE_ALL;
  addr_t job_cu_addr = '0, job_cu_stride = '0, job_sa_addr = '0, job_sa_stride = '0,
         job_res_addr = '0;
  coord_t job_sa_w = '0, job_sa_h = '0;
  logic busy, done;
  cand_t best;
  int checks = 0, failures = 0;

  nmc_subsystem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CU_A = 23'h01_0000, SA_A = 23'h02_0000, SA_S = 128, RES_A = 23'h00_1000;

  task automatic host_write(int a, word_t w);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = addr_t'(a); host_wdata = w;
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output word_t w);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = addr_t'(a);
    @(negedge clk);
    host_req = 0;
    w = host_rdata;
  endtask

  task automatic check_res(int slot, int bx, int by, int n, int cun);
    word_t w;
    int unsigned e;
    host_read(RES_A + 32 * slot, w);
    e = min_block(bx, by, n, cun);
    checks++;
    if (!w[64] || w[31:0] != e || int'(w[47:32]) > sa_w - cun || int'(w[63:48]) > sa_h - cun ||
        sad_block(bx, by, n, int'(w[47:32]), int'(w[63:48])) != w[31:0]) begin
      failures++;
      $display("slot %0d: got %0d at (%0d,%0d), expected %0d", slot, w[31:0], w[47:32], w[63:48], e);
    end
  endtask

  task automatic run_job(cu_mode_e m, int w, int h, int budget);
    int n, cyc, g, base, j, y0, passes, exp_cyc;
    word_t wd;
    fill_random(w, h);
    n = cu_size(m);
    for (int c = 0; c < 32; c++) begin
      for (int r = 0; r < 32; r++) wd[8*r +: 8] = cu_px[c][r];
      host_write(CU_A + 32 * c, wd);
    end
    for (int x = 0; x < w; x++)
      for (int q = 0; q < 4; q++) begin
        for (int r = 0; r < 32; r++) wd[8*r +: 8] = sa_px[x][32 * q + r];
        host_write(SA_A + SA_S * x + 32 * q, wd);
      end
    @(negedge clk);
    job_mode = m; job_cu_addr = CU_A; job_cu_stride = 32;
    job_sa_addr = SA_A; job_sa_stride = SA_S; job_res_addr = RES_A;
    job_sa_w = coord_t'(w); job_sa_h = coord_t'(h);
    start = 1;
    cyc = 0;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    g = (m == MODE_SPEC8) ? 28 : (m == MODE_SPEC16) ? 8 : 4;
    base = 0; j = 0; y0 = 0; passes = 0;
    while (y0 <= h - n) begin
      passes++;
      if (j == 3) begin base += g; y0 = base; j = 0; end else begin y0++; j++; end
    end
    exp_cyc = 2 + n + passes * w + 10 + ((m == MODE_ALL) ? N_SLOTS : 1);
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("cycles %0d, expected %0d", cyc, exp_cyc);
    end
    if (budget > 0) begin
      checks++;
      if (cyc > budget) failures++;
    end
    if (m == MODE_ALL) begin
      for (int i = 0; i < 4; i++) for (int jj = 0; jj < 4; jj++) check_res(4*i+jj, 8*jj, 8*i, 8, 32);
      for (int i = 0; i < 2; i++) for (int jj = 0; jj < 2; jj++) check_res(16+2*i+jj, 16*jj, 16*i, 16, 32);
      check_res(20, 0, 0, 32, 32);
    end else begin
      check_res(0, 0, 0, n, n);
    end
    $display("%s CU %0dx%0d in %0dx%0d: %0d passes, %0d cycles%s", m.name(), n, n, w, h, passes, cyc,
             (budget > 0) ? $sformatf(" (budget %0d)", budget) : "");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(MODE_ALL,    60, 60, 2057);
    run_job(MODE_SPEC16, 60, 60, 0);
    run_job(MODE_SPEC8,  60, 60, 0);
    run_job(MODE_ALL,    36, 36, 0);
    run_job(MODE_SPEC8, 128, 128, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
