// halftone_system: the complete halftoning subsystem around the coprocessor.
//
// It joins the coprocessor with the three memories it works with: the
// dual-port source scanline buffer (2048 x 32 bits), which the host fills
// while the coprocessor reads it; the static RAM holding the threshold array
// description, which the host loads before a page; and the 8-bit output
// FIFO, which the output device (imaging engine) empties. The host processor
// and the output device are outside; their signals are the ports.
//
// The host reaches the threshold SRAM only while the coprocessor is idle; while
// a page runs the SRAM belongs to the coprocessor (this design's choice, since
// the published architecture loads the array before halftoning starts). All
// memories read with one clock of latency; the FIFO read port is show-ahead.
// The default LANES = 2 is the published architecture's main configuration (two
// comparators); 4 and 8 are its scaled versions.
module halftone_system
  import ht_pkg::*;
#(
  parameter int unsigned LANES     = 2,
  parameter int unsigned THR_DEPTH_AW = THR_AW,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host: register bus
  input  logic                  hwrite,
  input  logic [3:0]            haddr,
  input  logic [15:0]           hwdata,
  output logic [15:0]           hrdata,
  // host: source scanline buffer port
  input  logic                  hsrc_we,
  input  logic                  hsrc_re,
  input  logic [SRC_AW-1:0]     hsrc_addr,
  input  logic [SRC_WORD_W-1:0] hsrc_wdata,
  output logic [SRC_WORD_W-1:0] hsrc_rdata,
  // host: threshold SRAM port (used while not busy)
  input  logic                  hthr_we,
  input  logic [THR_AW-1:0]     hthr_addr,
  input  logic [LANES*GRAY_W:0] hthr_wdata,
  // output device
  input  logic                  dev_rd,
  output logic [7:0]            dev_data,
  output logic                  dev_empty,
  // interrupts and status
  output logic                  irq_a,
  output logic                  irq_b,
  output logic                  in_req,
  output logic                  out_full,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned THR_W = 1 + LANES * GRAY_W;

  logic                  src_re;
  logic [SRC_AW-1:0]     src_addr;
  logic [SRC_WORD_W-1:0] src_rdata;
  logic                  thr_re, sram_re, sram_we;
  logic [THR_AW-1:0]     thr_addr, sram_addr;
  logic [THR_W-1:0]      thr_rdata;
  logic                  out_we, out_half_full;
  logic [7:0]            out_data;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  halftone_coprocessor #(.LANES(LANES), .THR_W(THR_W)) u_core (
    .clk, .rst_n, .hwrite, .haddr, .hwdata, .hrdata,
    .src_re, .src_addr, .src_rdata,
    .thr_re, .thr_addr, .thr_rdata,
    .out_we, .out_data, .out_full, .out_half_full,
    .out_empty(dev_empty),
    .irq_a, .irq_b, .in_req, .busy, .done
  );

  src_line_buffer #(.AW(SRC_AW), .DW(SRC_WORD_W)) u_srcbuf (
    .clk,
    .a_re   (src_re),
    .a_addr (src_addr),
    .a_rdata(src_rdata),
    .b_we   (hsrc_we),
    .b_re   (hsrc_re),
    .b_addr (hsrc_addr),
    .b_wdata(hsrc_wdata),
    .b_rdata(hsrc_rdata)
  );

  assign sram_we   = hthr_we && !busy;
  assign sram_re   = busy && thr_re;
  assign sram_addr = busy ? thr_addr : hthr_addr;

  threshold_sram #(.AW(THR_DEPTH_AW), .DW(THR_W)) u_thrram (
    .clk,
    .re   (sram_re),
    .we   (sram_we),
    .addr (sram_addr[THR_DEPTH_AW-1:0]),
    .wdata(hthr_wdata),
    .rdata(thr_rdata)
  );

  out_fifo #(.DW(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en    (out_we),
    .wdata    (out_data),
    .rd_en    (dev_rd),
    .rdata    (dev_data),
    .empty    (dev_empty),
    .full     (out_full),
    .half_full(out_half_full),
    .count    (fifo_count)
  );

endmodule
