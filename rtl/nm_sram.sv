// Near-memory SRAM: SIZE_BYTES of storage with one 32-byte port, one access
// per cycle (32B/cycle).
//
// The array is split into 32 byte-wide banks; byte address A lives in bank
// A mod 32 at row A / 32. An access at any byte address touches each bank
// once (banks below A mod 32 use the next row), so a 32-pixel column segment
// starting at any row is read in one cycle. Byte i of rdata / wdata is the
// byte at address addr + i; addresses wrap at the end of the array.
//
// Timing: req with we = 0 returns rdata on the next cycle (registered read);
// req with we = 1 writes all 32 bytes at the clock edge. The contents are
// not reset.
// The 8 MB size and the 32B/cycle port follow the source design; the bank
// organisation that allows unaligned column reads is this design's own.
module nm_sram
  import sad_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8 * 1024 * 1024
) (
  input  logic  clk,
  input  logic  req,
  input  logic  we,
  input  addr_t addr,
  input  word_t wdata,
  output word_t rdata
);

  localparam int unsigned NBANK = WORD_W / 8;          // 32
  localparam int unsigned DEPTH = SIZE_BYTES / NBANK;
  localparam int unsigned ROW_W = $clog2(DEPTH);

  logic [7:0] bank_q [NBANK];
  logic [4:0] off_q;

  logic [4:0]       off;
  logic [ROW_W-1:0] row0;
  assign off  = addr[4:0];
  assign row0 = ROW_W'(addr >> 5);

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [ROW_W-1:0] row;
    logic [4:0]       idx;   // which byte of the word lands in this bank
    logic [7:0]       mem [DEPTH];
    if (b == NBANK-1) begin : g_last
      assign row = row0;
    end else begin : g_rest
      assign row = (5'(b) < off) ? row0 + 1'b1 : row0;
    end
    assign idx = 5'(b) - off;
    always_ff @(posedge clk) begin
      if (req) begin
        if (we) mem[row]  <= wdata[idx*8 +: 8];
        else    bank_q[b] <= mem[row];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req && !we) off_q <= off;
  end

  always_comb begin
    for (int i = 0; i < NBANK; i++)
      rdata[i*8 +: 8] = bank_q[5'(off_q + 5'(i))];
  end

endmodule
