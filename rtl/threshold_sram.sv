// threshold_sram: the static RAM holding the threshold array description.
//
// One synchronous port: a read returns data one clock after re, a write takes
// effect at the clock edge. Words are 1 + 8*LANES bits wide (a flag and either
// LANES thresholds or a displacement vector); the default of 2^20 words holds a
// superscreen of about a million threshold values as pairs, plus its vectors.
// The published architecture asks for an external static memory loaded by the
// host before halftoning; depth, width and latency are this design's choices.
module threshold_sram #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 17
) (
  input  logic          clk,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
