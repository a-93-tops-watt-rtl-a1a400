// Testbench of row_comparator: random candidate sets (some invalid, some
// with equal SADs); the registered output must be the smallest valid SAD,
// the earliest input on a tie, or invalid when no input is valid.
module tb_row_comparator;
  import sad_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  cand_t cand [N];
  cand_t row_min;
  int checks = 0, failures = 0;

  row_comparator #(.N_IN(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bi;
    for (int k = 0; k < N; k++) cand[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < N; k++) begin
        cand[k].valid = ($urandom_range(0, 3) != 0);
        cand[k].sad   = $urandom_range(0, 15);   // small range forces ties
        cand[k].mvx   = coord_t'(k);
        cand[k].mvy   = coord_t'(n);
      end
      bi = -1;
      for (int k = 0; k < N; k++)
        if (cand[k].valid && (bi < 0 || cand[k].sad < cand[bi].sad)) bi = k;
      @(negedge clk);
      checks++;
      if (bi < 0) begin
        if (row_min.valid) failures++;
      end else if (!row_min.valid || row_min.sad != cand[bi].sad ||
                   row_min.mvx != coord_t'(bi) || row_min.mvy != coord_t'(n)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d@%0d exp %0d@%0d", n, row_min.sad, row_min.mvx, cand[bi].sad, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
