// src_line_buffer: the dual-port source scanline buffer, 2048 words of 32
// bits (four 8-bit gray pixels per word).
//
// Port A is the coprocessor's synchronous read port: data appears one clock
// after a_re. Port B is the host's port; the host writes new source scanlines
// through it while the coprocessor keeps reading, and may read them back (data
// one clock after b_re). The size and the dual-port nature follow the published
// architecture; the one-clock read latency is this design's choice. Reads of a
// word written in the same clock return the old contents.
module src_line_buffer #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_re,
  input  logic [AW-1:0] a_addr,
  output logic [DW-1:0] a_rdata,
  input  logic          b_we,
  input  logic          b_re,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk)
    if (a_re) a_rdata <= mem[a_addr];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
