// codec_pkg: constants and types shared by the video subsystem of the
// H.264/AVC HP@L4.2 codec.
//
// The picture size (1920x1088, so 120x68 macroblocks), the 500 clock/MB
// macroblock budget, the six-stage encoder and four-stage decoder pipelines,
// the 64-bit multimedia bus and the two reference pictures follow the
// published architecture. The external memory layout of a picture (one
// 512-byte slot per macroblock, 384 bytes used) and the bus request format
// are this design's own choices.
package codec_pkg;

  // Picture geometry of HP@L4.2 (1920x1088).
  localparam int unsigned MB_COLS     = 120;
  localparam int unsigned MB_ROWS     = 68;
  localparam int unsigned MBS_PER_PIC = MB_COLS * MB_ROWS;

  // Per-macroblock clock budget (266 MHz / 489,600 MB/s = 543, 500 with margin).
  localparam int unsigned MB_CYCLE_BUDGET = 500;

  // Pipeline depths.
  localparam int unsigned ENC_STAGES = 6;
  localparam int unsigned DEC_STAGES = 4;
  localparam int unsigned MAX_STAGES = 6;

  // Multimedia bus: 64-bit AXI.
  localparam int unsigned BUS_DW = 64;
  localparam int unsigned BUS_AW = 32;

  // A 4:2:0 macroblock is 256 luma + 128 chroma bytes = 48 bus beats. It is
  // stored in a 512-byte aligned slot so that a burst never crosses 4 KB.
  localparam int unsigned MB_BEATS      = 48;
  localparam int unsigned MB_SLOT_BYTES = 512;

  localparam int unsigned NUM_REF = 2;

  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } codec_mode_e;

  typedef enum logic [1:0] {
    SLICE_I = 2'd0,
    SLICE_P = 2'd1,
    SLICE_B = 2'd2
  } slice_type_e;

  // Codec registers written by the RISC for one slice.
  typedef struct packed {
    codec_mode_e mode;
    slice_type_e slice_type;
    logic [5:0]  qp;
    logic [13:0] first_mb;   // raster index of the first macroblock
    logic [13:0] num_mbs;    // macroblocks in the slice
    logic [1:0]  num_ref;    // active reference pictures (0..2)
    logic [31:0] cur_base;   // byte address of the current picture
    logic [31:0] ref_base0;  // byte address of reference picture 0
    logic [31:0] ref_base1;  // byte address of reference picture 1
    logic [31:0] rec_base;   // byte address of the reconstructed picture
  } slice_regs_t;

  // One burst request towards external memory. len is the number of
  // 64-bit beats minus one, as on AXI.
  typedef struct packed {
    logic              write;
    logic [BUS_AW-1:0] addr;
    logic [7:0]        len;
  } bus_req_t;

  // Byte address of a macroblock slot inside a picture.
  function automatic logic [BUS_AW-1:0] mb_addr(logic [BUS_AW-1:0] base,
                                                logic [6:0] mb_row,
                                                logic [6:0] mb_col);
    logic [BUS_AW-1:0] idx;
    idx = BUS_AW'(mb_row) * BUS_AW'(MB_COLS) + BUS_AW'(mb_col);
    return base + (idx << $clog2(MB_SLOT_BYTES));
  endfunction

endpackage
