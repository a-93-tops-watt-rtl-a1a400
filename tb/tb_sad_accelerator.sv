// Testbench of sad_accelerator with a byte-array memory model (one 32B
// access per cycle, read data one cycle later). For a job in each mode it
// places a random CU and search area in memory column by column, runs the
// search and checks every result word written back: its SAD must be the
// smallest SAD of that block over the search range, found here by brute
// force, and the reported position must reproduce it. The best output and
// the start-to-done cycle count are checked as well.
module tb_sad_accelerator;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  cu_mode_e job_mode;
  addr_t job_cu_addr, job_cu_stride, job_sa_addr, job_sa_stride, job_res_addr;
  coord_t job_sa_w, job_sa_h;
  logic busy, done;
  cand_t best;
  logic mem_req, mem_we;
  addr_t mem_addr;
  word_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  sad_accelerator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MEMSZ = 1 << 16;
  byte unsigned mem [MEMSZ];
  always @(posedge clk) if (mem_req) begin
    if (mem_we) for (int b = 0; b < 32; b++) mem[(int'(mem_addr) + b) % MEMSZ] = mem_wdata[8*b +: 8];
    else        for (int b = 0; b < 32; b++) mem_rdata[8*b +: 8] <= mem[(int'(mem_addr) + b) % MEMSZ];
  end

  localparam int CU_A = 256, SA_A = 4096, SA_S = 64, RES_A = 1024;

  task automatic check_res(int slot, int bx, int by, int n, int cun);
    int unsigned e, got, at;
    int mx, my;
    bit v;
    got = {mem[RES_A + 32*slot + 3], mem[RES_A + 32*slot + 2], mem[RES_A + 32*slot + 1], mem[RES_A + 32*slot]};
    mx  = {mem[RES_A + 32*slot + 5], mem[RES_A + 32*slot + 4]};
    my  = {mem[RES_A + 32*slot + 7], mem[RES_A + 32*slot + 6]};
    v   = mem[RES_A + 32*slot + 8][0];
    e = min_block(bx, by, n, cun);
    checks++;
    if (!v || got != e || mx > sa_w - cun || my > sa_h - cun) begin
      failures++;
      $display("slot %0d: got %0d at (%0d,%0d) valid %0d, expected %0d", slot, got, mx, my, v, e);
    end else begin
      at = sad_block(bx, by, n, mx, my);
      checks++;
      if (at != got) failures++;
    end
  endtask

  task automatic run_job(cu_mode_e m, int w, int h);
    int n, t0, t1, passes, g, base, j, y0, exp_cyc;
    fill_random(w, h);
    n = cu_size(m);
    for (int i = 0; i < MEMSZ; i++) mem[i] = 8'($urandom);
    for (int c = 0; c < n; c++)
      for (int r = 0; r < n; r++) mem[CU_A + 32*c + r] = cu_px[c][r];
    for (int x = 0; x < w; x++)
      for (int y = 0; y < h; y++) mem[SA_A + SA_S*x + y] = sa_px[x][y];
    @(negedge clk);
    job_mode = m; job_cu_addr = CU_A; job_cu_stride = 32;
    job_sa_addr = SA_A; job_sa_stride = SA_S; job_res_addr = RES_A;
    job_sa_w = coord_t'(w); job_sa_h = coord_t'(h);
    start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = $time;
    // cycle budget worked out from the pass schedule
    g = (m == MODE_SPEC8) ? 28 : (m == MODE_SPEC16) ? 8 : 4;
    base = 0; j = 0; y0 = 0; passes = 0;
    while (y0 <= h - n) begin
      passes++;
      if (j == 3) begin base += g; y0 = base; j = 0; end else begin y0++; j++; end
    end
    exp_cyc = 2 + n + passes * w + 10 + ((m == MODE_ALL) ? N_SLOTS : 1);
    checks++;
    if ((t1 - t0) / 10 != exp_cyc) begin
      failures++;
      $display("cycles %0d expected %0d", (t1 - t0) / 10, exp_cyc);
    end
    @(negedge clk);
    if (m == MODE_ALL) begin
      for (int i = 0; i < 4; i++) for (int jj = 0; jj < 4; jj++) check_res(4*i+jj, 8*jj, 8*i, 8, 32);
      for (int i = 0; i < 2; i++) for (int jj = 0; jj < 2; jj++) check_res(16+2*i+jj, 16*jj, 16*i, 16, 32);
      check_res(20, 0, 0, 32, 32);
    end else begin
      check_res(0, 0, 0, n, n);
      checks++;
      if (!best.valid || best.sad != psad_t'(min_block(0, 0, n, n))) failures++;
    end
    $display("mode %s %0dx%0d done in %0d cycles", m.name(), w, h, (t1 - t0) / 10);
  endtask

  initial begin
    job_mode = MODE_ALL; job_cu_addr = 0; job_cu_stride = 0; job_sa_addr = 0;
    job_sa_stride = 0; job_sa_w = 0; job_sa_h = 0; job_res_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(MODE_ALL, 40, 36);
    run_job(MODE_SPEC16, 32, 40);
    run_job(MODE_SPEC8, 40, 40);
    run_job(MODE_SPEC8, 12, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
