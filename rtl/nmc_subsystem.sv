// Near-memory SAD subsystem: the SAD accelerator next to its SRAM.
//
// The host (a processor or video-encoder ASIC outside this design) fills the
// SRAM with the current CU and the search area through the host port,
// offloads a search with start and the job fields, waits for done, and reads
// the results that the accelerator wrote back into the SRAM. While the
// accelerator is busy it owns the SRAM port and host accesses are ignored
// (host_grant low); otherwise the host has the port.
//
// Timing: host reads return host_rdata one cycle after the request.
// The SRAM size and the offload / write-back flow follow the source design;
// the single shared port and the grant rule are this design's own.
module nmc_subsystem
  import sad_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8 * 1024 * 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  // host memory port
  input  logic     host_req,
  input  logic     host_we,
  input  addr_t    host_addr,
  input  word_t    host_wdata,
  output word_t    host_rdata,
  output logic     host_grant,
  // offload
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
  output cand_t    best
);

  logic  acc_req, acc_we;
  addr_t acc_addr;
  word_t acc_wdata, rdata;

  sad_accelerator u_acc (
    .clk, .rst_n, .start, .job_mode, .job_cu_addr, .job_cu_stride,
    .job_sa_addr, .job_sa_stride, .job_sa_w, .job_sa_h, .job_res_addr,
    .busy, .done, .best,
    .mem_req(acc_req), .mem_we(acc_we), .mem_addr(acc_addr),
    .mem_wdata(acc_wdata), .mem_rdata(rdata)
  );

  assign host_grant = !busy;

  logic  m_req, m_we;
  addr_t m_addr;
  word_t m_wdata;
  always_comb begin
    if (busy) begin
      m_req = acc_req; m_we = acc_we; m_addr = acc_addr; m_wdata = acc_wdata;
    end else begin
      m_req = host_req; m_we = host_we; m_addr = host_addr; m_wdata = host_wdata;
    end
  end

  nm_sram #(.SIZE_BYTES(MEM_BYTES)) u_sram (
    .clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata);

  assign host_rdata = rdata;

endmodule
