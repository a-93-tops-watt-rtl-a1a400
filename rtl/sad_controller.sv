// Controller: takes an offload from the host and runs one motion search.
//
// Phases, each entered once (no data goes back and forth):
//   SET      latch the job, set the fabric for the CU mode, clear the
//            comparators (1 cycle)
//   LOAD     read the N columns of the NxN CU, one 32B word per cycle
//   COMPUTE  stream the search area: for each pass with base row y0 read
//            columns x = 0 .. sa_w-1 of the 32-row segment starting at y0,
//            back to back, one word per cycle
//   DRAIN    let the last columns run through the grid and comparators
//   WB       write the results back, one 32B word per result
//   DONE     pulse done, return to IDLE
//
// Pass schedule: a column segment serves K windows spaced 4 rows apart
// (K = 1 for the 32x32 CU, 2 for 16x16, 7 for 8x8), so the base rows run
// y0 = G*g + j with j = 0..3 and G = 4K, until y0 exceeds sa_h - N.
// Memory layout: CU and search area are stored column by column; column c
// of the CU starts at cu_addr + c*cu_stride, column x of the search area at
// sa_addr + x*sa_stride, rows at consecutive bytes. Result i goes to
// res_addr + 32*i as {valid, mvy, mvx, sad} in bits 64..0 (mvx, mvy 16 bits
// each, zero extended); bits 255..65 of the write word are always zero.
// The phase order and offload/result write-back follow the source design;
// the job registers, layout, schedule and drain length are this design's own.
module sad_controller
  import sad_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // offload from the host
  input  logic     start,
  input  cu_mode_e job_mode,
  input  addr_t    job_cu_addr,
  input  addr_t    job_cu_stride,
  input  addr_t    job_sa_addr,
  input  addr_t    job_sa_stride,
  input  coord_t   job_sa_w,
  input  coord_t   job_sa_h,
  input  addr_t    job_res_addr,
  output logic     busy,
  output logic     done,
  // memory port
  output logic     mem_req,
  output logic     mem_we,
  output addr_t    mem_addr,
  output word_t    mem_wdata,
  // fabric and data buffer
  output logic     fabric_set,
  output cu_mode_e mode,
  output logic     grid_en,
  output logic     cmp_clear,
  output logic     req_load,
  output logic     req_comp,
  output logic [4:0] req_col,
  output coord_t   req_x,
  output coord_t   req_y0,
  output coord_t   max_x,
  output coord_t   max_y,
  // results, read during write-back
  output logic [4:0] res_idx,
  input  cand_t    res_cand
);

  // read latency 1 + data buffer 1 + grid 4 + row comparator 1 + tracker 1
  localparam int unsigned DRAIN_CYC = 10;

  typedef enum logic [2:0] {S_IDLE, S_SET, S_LOAD, S_COMP, S_DRAIN, S_WB, S_DONE}
    state_e;
  state_e state;

  addr_t  cu_addr, cu_stride, sa_addr, sa_stride, res_addr;
  coord_t sa_w;
  coord_t x, y0, base;
  logic [1:0] j;
  logic [4:0] col;
  logic [4:0] nres;
  addr_t  col_addr;   // address of column x of the current pass
  logic [3:0] drain;

  coord_t n_cu;       // CU edge
  coord_t gstep;      // G of the pass schedule
  always_comb begin
    case (mode)
      MODE_SPEC8:  begin n_cu = 8;  gstep = 28; end
      MODE_SPEC16: begin n_cu = 16; gstep = 8;  end
      default:     begin n_cu = 32; gstep = 4;  end
    endcase
  end

  coord_t y0_next;
  assign y0_next = (j == 2'd3) ? base + gstep : y0 + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode      <= MODE_ALL;
      cu_addr   <= '0; cu_stride <= '0; sa_addr <= '0; sa_stride <= '0;
      res_addr  <= '0; sa_w <= '0; max_x <= '0; max_y <= '0;
      x <= '0; y0 <= '0; base <= '0; j <= '0; col <= '0; nres <= '0;
      col_addr <= '0; drain <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          mode      <= job_mode;
          cu_addr   <= job_cu_addr;
          cu_stride <= job_cu_stride;
          sa_addr   <= job_sa_addr;
          sa_stride <= job_sa_stride;
          res_addr  <= job_res_addr;
          sa_w      <= job_sa_w;
          max_x     <= job_sa_w - coord_t'(cu_size(job_mode));
          max_y     <= job_sa_h - coord_t'(cu_size(job_mode));
          state     <= S_SET;
        end
        S_SET: begin
          col   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          cu_addr <= cu_addr + cu_stride;
          col     <= col + 1'b1;
          if (col == 5'(n_cu - 1)) begin
            x <= '0; y0 <= '0; base <= '0; j <= '0;
            col_addr <= sa_addr;
            state    <= S_COMP;
          end
        end
        S_COMP: begin
          if (x == sa_w - 1'b1) begin
            x <= '0;
            if (y0_next > max_y) begin
              drain <= '0;
              state <= S_DRAIN;
            end else begin
              y0 <= y0_next;
              if (j == 2'd3) base <= base + gstep;
              j <= j + 1'b1;
              col_addr <= sa_addr + addr_t'(y0_next);
            end
          end else begin
            x <= x + 1'b1;
            col_addr <= col_addr + sa_stride;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 4'(DRAIN_CYC - 1)) begin
            nres  <= '0;
            state <= S_WB;
          end
        end
        S_WB: begin
          nres <= nres + 1'b1;
          if (mode != MODE_ALL || nres == 5'(N_SLOTS - 1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign fabric_set = (state == S_SET);
  assign cmp_clear  = (state == S_SET);
  assign grid_en    = 1'b1;
  assign req_load   = (state == S_LOAD);
  assign req_comp   = (state == S_COMP);
  assign req_col    = col;
  assign req_x      = x;
  assign req_y0     = y0;
  assign res_idx    = nres;

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    case (state)
      S_LOAD: begin mem_req = 1'b1; mem_addr = cu_addr; end
      S_COMP: begin mem_req = 1'b1; mem_addr = col_addr; end
      S_WB: begin
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        mem_addr = res_addr + addr_t'({nres, 5'b0});
        mem_wdata[31:0]  = res_cand.sad;
        mem_wdata[47:32] = 16'(res_cand.mvx);
        mem_wdata[63:48] = 16'(res_cand.mvy);
        mem_wdata[64]    = res_cand.valid;
      end
      default: ;
    endcase
  end

  // done is a single-cycle pulse, and an idle controller leaves memory alone.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_idle_quiet: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !mem_req);

endmodule
