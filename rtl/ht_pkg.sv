// ht_pkg: constants, register map and configuration record shared by the
// halftoning coprocessor.
//
// Gray pixels and thresholds are 8 bits (256 gray levels). The source
// scanline buffer is 2048 words of 32 bits, i.e. four gray pixels per word,
// split here into two scanline slots of 1024 words (the slot split is this
// design's choice). Image sizes and the scaling fraction d/s are 16-bit
// values written by the host before a page is started.
package ht_pkg;

  parameter int unsigned GRAY_W       = 8;
  parameter int unsigned SRC_WORD_W   = 32;
  parameter int unsigned PIX_PER_WORD = SRC_WORD_W / GRAY_W;  // 4
  parameter int unsigned SRC_AW       = 11;                   // 2048 words
  parameter int unsigned SLOT_AW      = SRC_AW - 1;           // 1024 words per slot
  parameter int unsigned DIM_W        = 16;                   // image sizes, d, s
  parameter int unsigned EPS_W        = DIM_W + 2;            // signed error term
  parameter int unsigned THR_AW       = 20;                   // threshold SRAM address

  typedef logic [GRAY_W-1:0] gray_t;

  // Host register map (word addresses on the host bus).
  typedef enum logic [3:0] {
    REG_CTRL       = 4'd0,   // write: command bits, read: status bits
    REG_DST_W      = 4'd1,   // ImDstW, output pixels per scanline
    REG_DST_H      = 4'd2,   // ImDstH, output scanlines
    REG_SCALE_D    = 4'd3,   // d of the irreducible scale fraction d/s
    REG_SCALE_S    = 4'd4,   // s of the irreducible scale fraction d/s
    REG_SRC_H      = 4'd5,   // source scanlines supplied for the page
    REG_THR_BASE_L = 4'd6,   // threshold array base address, low 16 bits
    REG_THR_BASE_H = 4'd7,   // threshold array base address, high bits
    REG_ROW_PITCH  = 4'd8,   // SRAM words between two tile rows
    REG_TILE_ROWS  = 4'd9,   // rows of the (Holladay) threshold rectangle
    REG_TILE_COLS  = 4'd10,  // threshold groups per tile row
    REG_TILE_SHIFT = 4'd11   // group shift applied when wrapping to row 0
  } reg_addr_e;

  // Command bits written to REG_CTRL (each is a one-cycle strobe).
  parameter int unsigned CMD_START      = 0;
  parameter int unsigned CMD_LINE_READY = 1;
  parameter int unsigned CMD_ABORT      = 2;

  // Status bits read from REG_CTRL.
  parameter int unsigned ST_BUSY   = 0;
  parameter int unsigned ST_DONE   = 1;
  parameter int unsigned ST_IRQ_A  = 2;
  parameter int unsigned ST_IRQ_B  = 3;
  parameter int unsigned ST_IN_REQ = 4;
  parameter int unsigned ST_OUT_FULL = 5;

  typedef struct packed {
    logic [DIM_W-1:0]  dst_w;
    logic [DIM_W-1:0]  dst_h;
    logic [DIM_W-1:0]  scale_d;
    logic [DIM_W-1:0]  scale_s;
    logic [DIM_W-1:0]  src_h;
    logic [THR_AW-1:0] thr_base;
    logic [DIM_W-1:0]  row_pitch;
    logic [DIM_W-1:0]  tile_rows;
    logic [DIM_W-1:0]  tile_cols;
    logic [DIM_W-1:0]  tile_shift;
  } cfg_t;

endpackage
