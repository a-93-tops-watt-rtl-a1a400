// Testbench of vector_sad_unit: random columns and partial SADs; the
// registered output must equal the incoming partial SAD plus the four
// absolute differences of the previous cycle. Also checks that en = 0 holds.
module tb_vector_sad_unit;
  import sad_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  col4_t ref_col, cu_col;
  psad_t psad_in, psad_out;
  int checks = 0, failures = 0;

  vector_sad_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic psad_t expect_sum(col4_t r, col4_t c, psad_t p);
    psad_t s = p;
    for (int i = 0; i < 4; i++) begin
      int a = r[8*i +: 8];
      int b = c[8*i +: 8];
      s += psad_t'((a > b) ? a - b : b - a);
    end
    return s;
  endfunction

  initial begin
    psad_t exp_v, hold;
    ref_col = '0; cu_col = '0; psad_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (psad_out !== '0) failures++;
    checks++;
    en = 1;
    for (int n = 0; n < 500; n++) begin
      ref_col = $urandom; cu_col = $urandom;
      psad_in = (n % 5 == 0) ? 32'hFFFF_F000 + $urandom_range(0, 4095) : $urandom_range(0, 1 << 20);
      if (n % 7 == 0) begin ref_col = '1; cu_col = '0; end
      exp_v = expect_sum(ref_col, cu_col, psad_in);
      @(negedge clk);
      checks++;
      if (psad_out !== exp_v) begin
        failures++;
        $display("mismatch n=%0d got %0d exp %0d", n, psad_out, exp_v);
      end
    end
    en = 0;
    hold = psad_out;
    ref_col = $urandom; psad_in = 123;
    @(negedge clk);
    checks++;
    if (psad_out !== hold) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
