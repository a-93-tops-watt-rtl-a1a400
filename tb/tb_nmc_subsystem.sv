// End-to-end testbench of nmc_subsystem at its default size (8 MB SRAM,
// 8x8 PE grid). Playing the host, it writes a random CU and search area into
// the SRAM through the host port, offloads a search, waits for done and
// reads the result words back through the host port, checking each against
// a brute-force search. Jobs cover all three CU modes in a row (mode
// switches), several passes per job, and a host write attempted while the
// accelerator owns the memory (it must be ignored). Each of these mechanisms
// is counted and must occur at least once.
module tb_nmc_subsystem;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CU_A = 23'h10_0000, SA_S = 64, RES_A = 23'h7F_F000;
  int sa_a;
  int n_mode [3], n_switch, n_multipass, n_blocked;

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
    if (!w[64] || w[31:0] != e || int'(w[47:32]) > sa_w - cun || int'(w[63:48]) > sa_h - cun) begin
      failures++;
      $display("slot %0d: got %0d at (%0d,%0d), expected %0d", slot, w[31:0], w[47:32], w[63:48], e);
    end else begin
      checks++;
      if (sad_block(bx, by, n, int'(w[47:32]), int'(w[63:48])) != w[31:0]) failures++;
    end
  endtask

  cu_mode_e last_mode;
  task automatic run_job(cu_mode_e m, int w, int h, int sa_base);
    int n;
    word_t wd, probe;
    fill_random(w, h);
    n = cu_size(m);
    sa_a = sa_base;
    for (int c = 0; c < 32; c++) begin
      for (int r = 0; r < 32; r++) wd[8*r +: 8] = cu_px[c][r];
      host_write(CU_A + 32 * c, wd);
    end
    for (int x = 0; x < w; x++)
      for (int half = 0; half < 2; half++) begin
        for (int r = 0; r < 32; r++)
          wd[8*r +: 8] = (32 * half + r < h) ? sa_px[x][32 * half + r] : 8'($urandom);
        host_write(sa_a + SA_S * x + 32 * half, wd);
      end
    @(negedge clk);
    job_mode = m; job_cu_addr = CU_A; job_cu_stride = 32;
    job_sa_addr = addr_t'(sa_a); job_sa_stride = SA_S; job_res_addr = RES_A;
    job_sa_w = coord_t'(w); job_sa_h = coord_t'(h);
    start = 1;
    @(negedge clk);
    start = 0;
    // a host write while busy must not reach the memory
    host_req = 1; host_we = 1; host_addr = CU_A; host_wdata = '1;
    checks++;
    if (host_grant) failures++;
    else n_blocked++;
    @(negedge clk);
    host_req = 0; host_we = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    host_read(CU_A, probe);
    for (int r = 0; r < 32; r++) wd[8*r +: 8] = cu_px[0][r];
    checks++;
    if (probe != wd) failures++;
    if (m == MODE_ALL) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) check_res(4*i+j, 8*j, 8*i, 8, 32);
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) check_res(16+2*i+j, 16*j, 16*i, 16, 32);
      check_res(20, 0, 0, 32, 32);
    end else begin
      check_res(0, 0, 0, n, n);
    end
    n_mode[m]++;
    if (m != last_mode) n_switch++;
    last_mode = m;
    if (h - n >= 1) n_multipass++;
    $display("mode %s %0dx%0d checked", m.name(), w, h);
  endtask

  initial begin
    last_mode = MODE_ALL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(MODE_ALL, 36, 34, 23'h20_0000);
    run_job(MODE_SPEC8, 24, 40, 23'h30_0011);
    run_job(MODE_SPEC16, 28, 36, 23'h40_0000);
    run_job(MODE_ALL, 33, 32, 23'h50_0000);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_mode[k] == 0) failures++;
    end
    checks++; if (n_switch < 2) failures++;
    checks++; if (n_multipass == 0) failures++;
    checks++; if (n_blocked == 0) failures++;
    $display("jobs ALL=%0d SPEC16=%0d SPEC8=%0d, mode switches %0d, multi-pass jobs %0d, blocked host writes %0d",
             n_mode[0], n_mode[1], n_mode[2], n_switch, n_multipass, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
