// Testbench of data_buffer: a request tag is given with each read and the
// read data one cycle later; two cycles after the request the eight buses
// must carry the word's 4-byte chunks (replicated by CU height for loads in
// the specific-CU modes) together with the tag.
module tb_data_buffer;
  import sad_pkg::*;

  logic clk = 0, rst_n = 0;
  cu_mode_e mode;
  logic req_load, req_comp;
  logic [4:0] req_col;
  coord_t req_x, req_y0;
  word_t rdata;
  col4_t bus [GRID];
  logic src_write, tag_valid;
  logic [4:0] load_col;
  coord_t tag_x, tag_y0;
  int checks = 0, failures = 0;

  data_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic ld, cp; logic [4:0] col; coord_t x, y0; word_t w; cu_mode_e m; } req_t;
  req_t q [$];

  initial begin
    req_t r, e;
    int rep;
    word_t w_next;
    mode = MODE_ALL; req_load = 0; req_comp = 0; req_col = 0; req_x = 0; req_y0 = 0; rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      if (n % 400 == 0) mode = cu_mode_e'(n / 400);
      // data for the request of the previous cycle
      rdata = w_next;
      r.m = mode;
      case ($urandom_range(0, 2))
        0: begin r.ld = 1; r.cp = 0; end
        1: begin r.ld = 0; r.cp = 1; end
        default: begin r.ld = 0; r.cp = 0; end
      endcase
      if ((n + 1) % 400 == 0) begin r.ld = 0; r.cp = 0; end  // mode is steady during a job
      r.col = $urandom; r.x = $urandom; r.y0 = $urandom;
      for (int i = 0; i < 8; i++) r.w[32*i +: 32] = $urandom;
      req_load = r.ld; req_comp = r.cp; req_col = r.col; req_x = r.x; req_y0 = r.y0;
      w_next = r.w;
      q.push_back(r);
      if (q.size() == 3) begin
        e = q.pop_front();   // issued two cycles ago, visible now
        checks++;
        if (src_write !== e.ld || tag_valid !== e.cp ||
            load_col !== e.col || tag_x !== e.x || tag_y0 !== e.y0) failures++;
        if (e.ld || e.cp) begin
          rep = (e.m == MODE_SPEC8) ? 2 : (e.m == MODE_SPEC16) ? 4 : 8;
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (bus[k] !== (e.ld ? e.w[32*(k % rep) +: 32] : e.w[32*k +: 32])) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
