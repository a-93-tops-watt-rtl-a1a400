// Shared types and constants of the near-memory SAD accelerator.
//
// The accelerator compares a coding unit (CU) of the current frame with every
// position inside a search area of the reference frame and reports the
// position with the smallest sum of absolute differences (SAD). Pixels are
// 8-bit luma samples. The memory delivers one 32-pixel column segment
// (32 bytes) per cycle; it is cut into eight 4-byte buses, one per PE row.
//
// Grid size (8x8 PEs of 4x4 pixels), the 32B/cycle memory width and the CU
// sizes 32/16/8 follow the document. Widths of the SAD, coordinates and
// addresses, the mode encoding and the candidate record are this design's
// own choices.
package sad_pkg;

  localparam int unsigned PIX_W    = 8;   // luma sample
  localparam int unsigned GRID     = 8;   // PE rows and PE columns
  localparam int unsigned PE_DIM   = 4;   // a PE computes a 4x4 SAD
  localparam int unsigned BUS_PIX  = GRID * PE_DIM;  // 32 pixels per memory word
  localparam int unsigned WORD_W   = BUS_PIX * PIX_W; // 256-bit (32B) memory word
  localparam int unsigned PSAD_W   = 32;  // partial SAD port "P" width
  localparam int unsigned COORD_W  = 10;  // search-area coordinates, up to 1023
  localparam int unsigned ADDR_W   = 23;  // byte address into 8 MB

  // Number of result slots written back in all-CU mode:
  // 16 of 8x8, 4 of 16x16, 1 of 32x32.
  localparam int unsigned N_SLOT8  = 16;
  localparam int unsigned N_SLOT16 = 4;
  localparam int unsigned N_SLOTS  = N_SLOT8 + N_SLOT16 + 1;

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [PSAD_W-1:0]  psad_t;
  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [4*PIX_W-1:0] col4_t;   // one 4B bus: 4 vertically adjacent pixels

  // CU mode set in the set stage.
  //  MODE_ALL    traditional RDO: one 32x32 CU, with the min SAD of the CU and
  //              of each of its 16x16 and 8x8 sub-blocks
  //  MODE_SPEC16 modern RDO: one 16x16 CU on 4 logical cores
  //  MODE_SPEC8  modern RDO: one 8x8 CU on 16 logical cores
  typedef enum logic [1:0] {
    MODE_ALL    = 2'd0,
    MODE_SPEC16 = 2'd1,
    MODE_SPEC8  = 2'd2
  } cu_mode_e;

  // PE output demultiplexer targets (Fig. 4 of the source design).
  typedef enum logic [1:0] {
    OUT_ADJ    = 2'd0,   // next PE in the same row
    OUT_TOP    = 2'd1,   // PE in the row above
    OUT_BOT    = 2'd2,   // PE in the row below
    OUT_FABRIC = 2'd3    // adder / comparator
  } pe_out_e;

  // One SAD candidate: its value and the top-left position of the CU in the
  // search area.
  typedef struct packed {
    logic   valid;
    psad_t  sad;
    coord_t mvx;
    coord_t mvy;
  } cand_t;

  // Strict less-than keeps the earlier candidate on a tie.
  function automatic cand_t cand_min(cand_t a, cand_t b);
    if (!b.valid) return a;
    if (!a.valid) return b;
    return (b.sad < a.sad) ? b : a;
  endfunction

  // CU edge length in pixels for a mode.
  function automatic int unsigned cu_size(cu_mode_e m);
    case (m)
      MODE_SPEC16: return 16;
      MODE_SPEC8:  return 8;
      default:     return 32;
    endcase
  endfunction

endpackage
