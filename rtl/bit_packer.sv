// bit_packer: shift register and output register between the comparators
// and the 8-bit output FIFO.
//
// Each accepted group shifts LANES result bits into an 8-bit shift register,
// lane 0 (the leftmost pixel) first, so the first pixel of a byte ends in its
// most significant bit. When the register is full the byte moves to the output
// register, which is written to the output FIFO as soon as the FIFO is not
// full. A flush request at the end of a scanline pads a partly filled byte with
// white (0) bits, so every scanline starts on a byte boundary. The published
// architecture gives the shift registers and the output register; the bit
// order, the padding and the handshake are this design's choices. LANES must
// divide 8.
//
// Timing: in_ready falls only while the output register holds a byte the
// FIFO refuses (OutputBufferFull) and the next group would need it.
module bit_packer #(
  parameter int unsigned LANES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [LANES-1:0] in_bits,
  output logic             in_ready,
  input  logic             flush,      // hold until sr_empty
  output logic             sr_empty,
  output logic             idle,
  output logic             out_valid,
  output logic [7:0]       out_byte,
  input  logic             out_ready
);

  logic [7:0] sr;
  logic [3:0] cnt;
  logic       ob_free;
  logic       fill, do_flush;
  logic [7:0] sr_shifted;

  assign ob_free   = !out_valid || out_ready;
  assign in_ready  = (int'(cnt) + LANES < 8) || ob_free;
  assign fill      = in_valid && in_ready;
  assign do_flush  = flush && !in_valid && (cnt != 4'd0) && ob_free;
  assign sr_empty  = (cnt == 4'd0);
  assign idle      = sr_empty && !out_valid;

  always_comb begin
    sr_shifted = sr << LANES;
    for (int i = 0; i < LANES; i++)
      sr_shifted[LANES-1-i] = in_bits[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fill) begin
        if (int'(cnt) + LANES == 8) begin
          out_byte  <= sr_shifted;
          out_valid <= 1'b1;
          sr        <= '0;
          cnt       <= '0;
        end else begin
          sr  <= sr_shifted;
          cnt <= cnt + 4'(LANES);
        end
      end else if (do_flush) begin
        out_byte  <= sr << (4'd8 - cnt);
        out_valid <= 1'b1;
        sr        <= '0;
        cnt       <= '0;
      end
    end
  end

  // A byte offered to the FIFO stays, unchanged, until the FIFO takes it.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_byte));

endmodule
