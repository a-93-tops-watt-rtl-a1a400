// Testbench of sad_pe: loads a random 4x4 CU through the top bus, then
// streams random reference columns on the bottom bus (in_sel = 1) with a
// random partial SAD each cycle. Output after cycle n must be
// p[n-3] + sum_k |cu_k - ref[n-3+k]| (4-cycle latency, one column per
// cycle), on the demux port selected, with the other three ports at zero.
module tb_sad_pe;
  import sad_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  col4_t bus_top, bus_bot;
  logic in_sel, src_write;
  logic [1:0] src_col;
  psad_t psad_in;
  pe_out_e out_sel;
  psad_t out_adj, out_top, out_bot, out_fabric;
  int checks = 0, failures = 0;

  sad_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  col4_t cu [4];
  col4_t refs [1000];
  psad_t ps [1000];

  function automatic int unsigned colsad(col4_t a, col4_t b);
    int unsigned s = 0;
    for (int i = 0; i < 4; i++) begin
      int x = a[8*i +: 8];
      int y = b[8*i +: 8];
      s += (x > y) ? x - y : y - x;
    end
    return s;
  endfunction

  initial begin
    psad_t got, exp_v;
    pe_out_e sel;
    bus_top = '0; bus_bot = '0; in_sel = 0; src_write = 0; src_col = 0;
    psad_in = '0; out_sel = OUT_FABRIC;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: CU column k on the top bus; bottom bus carries noise
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      cu[k] = $urandom;
      bus_top = cu[k]; bus_bot = $urandom; src_write = 1; src_col = 2'(k);
    end
    @(negedge clk);
    src_write = 0;
    in_sel = 1;
    en = 1;
    for (int n = 0; n < 800; n++) begin
      refs[n] = $urandom;
      ps[n] = $urandom_range(0, 1 << 24);
      bus_bot = refs[n];
      bus_top = $urandom;
      psad_in = ps[n];
      sel = pe_out_e'(n / 100 % 4);
      out_sel = sel;
      @(negedge clk);
      if (n >= 3) begin
        exp_v = ps[n-3];
        for (int k = 0; k < 4; k++) exp_v += psad_t'(colsad(cu[k], refs[n-3+k]));
        case (sel)
          OUT_ADJ: got = out_adj;
          OUT_TOP: got = out_top;
          OUT_BOT: got = out_bot;
          default: got = out_fabric;
        endcase
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d exp %0d", n, got, exp_v);
        end
        checks++;
        if ((out_adj | out_top | out_bot | out_fabric) !== got) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
