// Testbench of final_comparator: several searches, each a clear followed by
// a random stream of candidate sets; after every cycle the output must be
// the smallest valid SAD seen since the clear (first seen on a tie).
module tb_final_comparator;
  import sad_pkg::*;

  localparam int N = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  cand_t cand [N];
  cand_t best;
  int checks = 0, failures = 0;

  final_comparator #(.N_IN(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cand_t m;
    for (int k = 0; k < N; k++) cand[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      clear = 1;
      for (int k = 0; k < N; k++) cand[k] = '{valid: 1'b1, sad: 0, mvx: 0, mvy: 0};
      @(negedge clk);
      clear = 0;
      checks++;
      if (best.valid) failures++;   // clear wins over candidates
      m = '0;
      for (int n = 0; n < 300; n++) begin
        for (int k = 0; k < N; k++) begin
          cand[k].valid = ($urandom_range(0, 2) == 0);
          cand[k].sad   = $urandom_range(20, 2000 - 6 * n);
          cand[k].mvx   = coord_t'(k);
          cand[k].mvy   = coord_t'(n);
          if (cand[k].valid && (!m.valid || cand[k].sad < m.sad)) m = cand[k];
        end
        @(negedge clk);
        checks++;
        if (best !== m) begin
          failures++;
          if (failures < 10) $display("s=%0d n=%0d got %0d exp %0d", s, n, best.sad, m.sad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
