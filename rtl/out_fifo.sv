// out_fifo: the 8-bit output FIFO between the coprocessor and the output
// device (imaging engine).
//
// A circular buffer with a write port for the coprocessor and a show-ahead read
// port for the output device: rdata is the oldest byte whenever empty is low,
// and rd_en removes it. full is the coprocessor's OutputBufferFull; half_full
// (at least DEPTH/2 bytes stored) is the signal the output device uses to start
// reading. Writes while full and reads while empty are ignored. The published
// architecture gives the 8-bit width and the half-full signalling; the depth of
// 1024 bytes is this design's choice. DEPTH must be a power of two.
module out_fifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic          full,
  output logic          half_full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty     = (count == '0);
  assign full      = (count == (AW+1)'(DEPTH));
  assign half_full = (count >= (AW+1)'(DEPTH / 2));
  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign rdata     = mem[rp];

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + AW'(1);
      if (do_rd) rp <= rp + AW'(1);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
