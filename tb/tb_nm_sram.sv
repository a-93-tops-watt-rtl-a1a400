// Testbench of nm_sram (reduced to 4 KB): random 32-byte writes at any byte
// address, mirrored in a byte array, interleaved with 32-byte reads at any
// byte address, including ones that wrap at the end of the array. Read data
// must match the mirror one cycle after the request.
module tb_nm_sram;
  import sad_pkg::*;

  localparam int SZ = 4096;
  logic clk = 0, req = 0, we = 0;
  addr_t addr;
  word_t wdata, rdata;
  int checks = 0, failures = 0;

  nm_sram #(.SIZE_BYTES(SZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned mirror [SZ];

  initial begin
    word_t e;
    int a;
    addr = '0; wdata = '0;
    // fill everything with aligned writes first
    for (int i = 0; i < SZ / 32; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = addr_t'(32 * i);
      for (int b = 0; b < 32; b++) begin
        wdata[8*b +: 8] = 8'($urandom);
        mirror[32*i + b] = wdata[8*b +: 8];
      end
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a = $urandom_range(0, SZ - 1);
      addr = addr_t'(a);
      if ($urandom_range(0, 2) == 0) begin
        req = 1; we = 1;
        for (int b = 0; b < 32; b++) begin
          wdata[8*b +: 8] = 8'($urandom);
          mirror[(a + b) % SZ] = wdata[8*b +: 8];
        end
      end else begin
        req = 1; we = 0;
        for (int b = 0; b < 32; b++) e[8*b +: 8] = mirror[(a + b) % SZ];
        @(negedge clk);
        req = 0;
        checks++;
        if (rdata !== e) begin
          failures++;
          if (failures < 5) $display("addr %0d mismatch", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
