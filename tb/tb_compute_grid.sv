// Testbench of compute_grid in all three modes. The testbench plays the data
// buffer: it loads the CU (replicated by CU height in the specific-CU
// modes) and streams the search area column by column, pass after pass, in
// the controller's schedule, with the column tags. Every valid candidate
// that comes out must carry the SAD of its block at its position, computed
// directly from the pixel arrays, and every position of the search range
// must be reported for every block (all-CU mode) or by some core
// (specific-CU modes). Cores whose window leaves the 32-row column must
// never report.
module tb_compute_grid;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  logic fabric_set = 0;
  cu_mode_e mode_in, mode;
  logic src_write = 0;
  logic [4:0] load_col = 0;
  col4_t bus [GRID];
  logic tag_valid = 0;
  coord_t tag_x = 0, tag_y0 = 0, max_x, max_y;
  cand_t cand8 [N_SLOT8];
  cand_t cand16 [N_SLOT16];
  cand_t cand32;
  int checks = 0, failures = 0;

  compute_grid dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [N_SLOTS][64][64];
  int n_cand;

  function automatic byte unsigned sa_at(int x, int y);
    return (y < MAX_SA) ? sa_px[x][y] : 8'h00;
  endfunction

  task automatic check_cand(cand_t c, int slot, int bx, int by, int n);
    int unsigned e;
    if (!c.valid) return;
    e = sad_block(bx, by, n, int'(c.mvx), int'(c.mvy));
    checks++;
    n_cand++;
    if (c.sad != psad_t'(e)) begin
      failures++;
      if (failures < 10) $display("slot %0d at (%0d,%0d): got %0d exp %0d", slot, c.mvx, c.mvy, c.sad, e);
    end
    seen[slot][c.mvx][c.mvy] = 1;
  endtask

  // sample the candidates every cycle
  cu_mode_e cur;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (cur == MODE_SPEC8) check_cand(cand8[4*i+j], 0, 0, 0, 8);
        else begin
          check_cand(cand8[4*i+j], 4*i+j, 8*j, 8*i, 8);
          // cores that would read past row 31 never report
          if (cur != MODE_ALL && cand8[4*i+j].valid) failures++;
        end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        if (cur == MODE_SPEC16) check_cand(cand16[2*i+j], 0, 0, 0, 16);
        else begin
          check_cand(cand16[2*i+j], 16 + 2*i+j, 16*j, 16*i, 16);
          if (cur != MODE_ALL && cand16[2*i+j].valid) failures++;
        end
    check_cand(cand32, 20, 0, 0, 32);
    if (cur != MODE_ALL && cand32.valid) failures++;
    if (cur == MODE_SPEC8 && (cand8[13].valid || cand8[15].valid)) failures++;
    if (cur == MODE_SPEC16 && cand16[3].valid) failures++;
  end

  task automatic run_mode(cu_mode_e m, int w, int h);
    int n, rep, g, base, y0, j, nslot;
    fill_random(w, h);
    n = cu_size(m);
    rep = n / 4;
    g = (m == MODE_SPEC8) ? 28 : (m == MODE_SPEC16) ? 8 : 4;
    foreach (seen[s, x, y]) seen[s][x][y] = 0;
    n_cand = 0;
    @(negedge clk);
    cur = m;
    mode_in = m; fabric_set = 1;
    max_x = coord_t'(w - n); max_y = coord_t'(h - n);
    @(negedge clk);
    fabric_set = 0;
    for (int c = 0; c < n; c++) begin
      src_write = 1; load_col = 5'(c);
      for (int k = 0; k < GRID; k++)
        for (int p = 0; p < 4; p++) bus[k][8*p +: 8] = cu_px[c][4*(k % rep) + p];
      @(negedge clk);
    end
    src_write = 0;
    base = 0; j = 0; y0 = 0;
    while (y0 <= h - n) begin
      for (int x = 0; x < w; x++) begin
        tag_valid = 1; tag_x = coord_t'(x); tag_y0 = coord_t'(y0);
        for (int k = 0; k < GRID; k++)
          for (int p = 0; p < 4; p++) bus[k][8*p +: 8] = sa_at(x, y0 + 4*k + p);
        @(negedge clk);
      end
      if (j == 3) begin base += g; y0 = base; j = 0; end
      else begin y0++; j++; end
    end
    tag_valid = 0;
    repeat (8) @(negedge clk);
    // coverage
    nslot = (m == MODE_ALL) ? N_SLOTS : 1;
    for (int s = 0; s < nslot; s++)
      for (int my = 0; my <= h - n; my++)
        for (int mx = 0; mx <= w - n; mx++) begin
          checks++;
          if (!seen[s][mx][my]) begin
            failures++;
            if (failures < 10) $display("mode %s slot %0d never reported (%0d,%0d)", m.name(), s, mx, my);
          end
        end
    $display("mode %s: %0d candidates checked", m.name(), n_cand);
  endtask

  initial begin
    cur = MODE_ALL; mode_in = MODE_ALL; max_x = 0; max_y = 0;
    for (int k = 0; k < GRID; k++) bus[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_mode(MODE_ALL, 40, 36);
    run_mode(MODE_SPEC16, 30, 40);
    run_mode(MODE_SPEC8, 24, 44);
    run_mode(MODE_ALL, 34, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
