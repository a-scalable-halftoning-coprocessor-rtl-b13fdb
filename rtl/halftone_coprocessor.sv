// halftone_coprocessor: the on-the-fly ordered-dithering coprocessor.
//
// Each clock it compares LANES gray pixels of the source image with LANES
// thresholds of the dither tile and produces LANES output bits (two in the
// basic architecture). Three tasks overlap in a pipeline: reading source pixels
// (gray_feeder, from the dual-port source scanline buffer), reading thresholds
// (threshold_fetch, from the threshold-array SRAM) and comparing and writing
// the result bits (comparator_array and bit_packer, towards the 8-bit output
// FIFO). A group is compared when the gray group and the threshold group are
// both ready and the shift register can take the bits; at best that is one
// group per clock, and a displacement vector in the threshold array costs one
// extra clock. Lanes past the end of a scanline (a width that is not a multiple
// of LANES) are written as white. The sequencer runs the scanlines, and
// ctrl_regs is the host's register interface.
//
// External signals: the host bus (h*), the source buffer read port (src_*),
// the threshold SRAM read port (thr_*), the output FIFO write port with
// out_full (OutputBufferFull) and out_half_full, and the two interrupt
// requests. IRQ_A asks the host for the next source scanline. IRQ_B tells
// the output device to read: it is high while the FIFO is at least half full,
// and after the end of a page while bytes remain (so the tail of the page is
// not stranded, this design's choice). in_req is InputBufferRequest, high
// while the page waits for a source scanline.
module halftone_coprocessor
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned THR_W = 1 + LANES * GRAY_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host bus
  input  logic                  hwrite,
  input  logic [3:0]            haddr,
  input  logic [15:0]           hwdata,
  output logic [15:0]           hrdata,
  // source scanline buffer, coprocessor port
  output logic                  src_re,
  output logic [SRC_AW-1:0]     src_addr,
  input  logic [SRC_WORD_W-1:0] src_rdata,
  // threshold array SRAM
  output logic                  thr_re,
  output logic [THR_AW-1:0]     thr_addr,
  input  logic [THR_W-1:0]      thr_rdata,
  // output FIFO
  output logic                  out_we,
  output logic [7:0]            out_data,
  input  logic                  out_full,
  input  logic                  out_half_full,
  input  logic                  out_empty,
  // synchronisation
  output logic                  irq_a,
  output logic                  irq_b,
  output logic                  in_req,
  output logic                  busy,
  output logic                  done
);

  cfg_t                    cfg;
  logic                    cmd_start, cmd_line_ready, cmd_abort;
  logic [7:0]              status;
  logic                    page_start, line_start, running, flush;
  logic [SRC_AW-1:0]       slot_base;
  logic [DIM_W-1:0]        line_groups, scale_r, dst_y, src_row;
  logic signed [EPS_W-1:0] eps0;
  logic                    grp_valid, thr_valid, fire;
  gray_t                   gray [LANES];
  gray_t                   thr  [LANES];
  logic [LANES-1:0]        black, lane_mask;
  logic                    pk_ready, sr_empty, pk_idle;
  logic                    vec_hit, thr_line_done;

  always_comb begin
    status              = '0;
    status[ST_BUSY]     = busy;
    status[ST_DONE]     = done;
    status[ST_IRQ_A]    = irq_a;
    status[ST_IRQ_B]    = irq_b;
    status[ST_IN_REQ]   = in_req;
    status[ST_OUT_FULL] = out_full;
  end
  assign irq_b  = out_half_full || (done && !out_empty);
  assign fire   = running && grp_valid && thr_valid && pk_ready;

  ctrl_regs u_regs (
    .clk, .rst_n, .hwrite, .haddr, .hwdata, .hrdata,
    .status, .busy, .cfg, .cmd_start, .cmd_line_ready, .cmd_abort
  );

  sequencer #(.LANES(LANES)) u_seq (
    .clk, .rst_n, .cfg, .cmd_start, .cmd_line_ready, .cmd_abort,
    .fire, .sr_empty, .pk_idle,
    .page_start, .line_start, .slot_base, .line_groups, .lane_mask, .eps0, .scale_r,
    .running, .flush, .busy, .done, .irq_a, .in_req, .dst_y, .src_row
  );

  gray_feeder #(.LANES(LANES)) u_gray (
    .clk, .rst_n, .line_start, .slot_base, .eps0,
    .scale_s  (cfg.scale_s),
    .scale_r  (scale_r),
    .mem_re   (src_re),
    .mem_addr (src_addr),
    .mem_rdata(src_rdata),
    .grp_valid, .gray,
    .grp_take (fire)
  );

  threshold_fetch #(.LANES(LANES), .THR_W(THR_W)) u_thr (
    .clk, .rst_n, .page_start, .line_start, .line_groups,
    .thr_base  (cfg.thr_base),
    .row_pitch (cfg.row_pitch),
    .tile_rows (cfg.tile_rows),
    .tile_cols (cfg.tile_cols),
    .tile_shift(cfg.tile_shift),
    .sram_re   (thr_re),
    .sram_addr (thr_addr),
    .sram_rdata(thr_rdata),
    .thr_valid, .thr,
    .thr_take  (fire),
    .vec_hit,
    .line_done (thr_line_done)
  );

  comparator_array #(.LANES(LANES)) u_cmp (
    .gray, .thr, .black
  );

  bit_packer #(.LANES(LANES)) u_pack (
    .clk, .rst_n,
    .in_valid (fire),
    .in_bits  (black & lane_mask),
    .in_ready (pk_ready),
    .flush, .sr_empty,
    .idle     (pk_idle),
    .out_valid(out_we),
    .out_byte (out_data),
    .out_ready(!out_full)
  );

endmodule
