// threshold_fetch: the threshold buffer and threshold-array walker.
//
// The threshold array lives in an external static RAM. Each word holds
// either a group of LANES thresholds (flag bit clear, threshold of lane i in
// bits 8*i+7:8*i) or a displacement vector (flag bit set, signed word
// offset in the low payload bits). Scanning a scanline reads consecutive
// words; when a vector comes back, the next read goes to the vector's own
// address plus its offset, so the vector costs exactly one extra clock and
// reading then continues from the pointed position. Vectors placed at the
// tile border thus make the scan cycle inside the tile. Thresholds are
// read one clock ahead of use into a two-entry buffer, so groups flow at
// one per clock while no vector is met.
//
// Per scanline the walker keeps a copy of the scanline's start position;
// after the last group of the line it moves that copy one tile row down.
// Below the last tile row it returns to row 0 with its column moved by
// tile_shift groups, modulo tile_cols, as in Holladay's rectangular
// representation of a slanted tile. The published architecture only says
// that each scanline starts just below the start of the previous one; the
// row/column bookkeeping, the relative vector encoding and the word layout
// are this design's choices.
//
// Interface: page_start (one clock) returns to tile row 0, column 0;
// line_start (one clock) begins a scanline of line_groups groups;
// thr_valid/thr_take is a valid/ready pair for thr[0..LANES-1]. The SRAM
// returns data one clock after sram_re. vec_hit pulses for every vector
// followed, line_done when the last group of the line enters the buffer.
module threshold_fetch
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned THR_W = 1 + LANES * GRAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              page_start,
  input  logic              line_start,
  input  logic [DIM_W-1:0]  line_groups,
  input  logic [THR_AW-1:0] thr_base,
  input  logic [DIM_W-1:0]  row_pitch,
  input  logic [DIM_W-1:0]  tile_rows,
  input  logic [DIM_W-1:0]  tile_cols,
  input  logic [DIM_W-1:0]  tile_shift,
  // threshold SRAM read port
  output logic              sram_re,
  output logic [THR_AW-1:0] sram_addr,
  input  logic [THR_W-1:0]  sram_rdata,
  // threshold group towards the comparators
  output logic              thr_valid,
  output gray_t             thr [LANES],
  input  logic              thr_take,
  output logic              vec_hit,
  output logic              line_done
);

  localparam int unsigned PW = LANES * GRAY_W;
  localparam int unsigned DW = (PW < THR_AW) ? PW : THR_AW;

  logic              active;
  logic [THR_AW-1:0] ptr;
  logic              ret_valid;
  logic [THR_AW-1:0] ret_addr;
  logic [DIM_W-1:0]  pushed;
  logic [DIM_W-1:0]  row;
  logic [THR_AW-1:0] row_off;
  logic [DIM_W-1:0]  col;

  logic              ret_vec, ret_pair, pop;
  logic [THR_AW-1:0] disp, eff_ptr;

  // two-entry threshold buffer
  logic [PW-1:0]     buf_q [2];
  logic              wp, rp;
  logic [1:0]        bcnt;

  assign ret_vec  = ret_valid &&  sram_rdata[THR_W-1];
  assign ret_pair = ret_valid && !sram_rdata[THR_W-1];
  assign disp     = THR_AW'(signed'(sram_rdata[DW-1:0]));
  assign eff_ptr  = ret_vec ? ret_addr + disp : ptr;
  assign pop      = thr_take && thr_valid;
  assign vec_hit  = ret_vec;

  always_comb begin
    logic space_ok;
    space_ok  = (int'(bcnt) + int'(ret_pair) - int'(pop)) < 2;
    sram_re   = active && !line_start && !page_start && space_ok &&
                ((int'(pushed) + int'(ret_pair)) < int'(line_groups));
    sram_addr = eff_ptr;
  end

  assign thr_valid = (bcnt != 2'd0);
  always_comb
    for (int i = 0; i < LANES; i++)
      thr[i] = buf_q[rp][i*GRAY_W +: GRAY_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      ptr       <= '0;
      ret_valid <= 1'b0;
      ret_addr  <= '0;
      pushed    <= '0;
      row       <= '0;
      row_off   <= '0;
      col       <= '0;
      wp        <= 1'b0;
      rp        <= 1'b0;
      bcnt      <= '0;
      line_done <= 1'b0;
      buf_q[0]  <= '0;
      buf_q[1]  <= '0;
    end else if (page_start) begin
      active    <= 1'b0;
      ret_valid <= 1'b0;
      row       <= '0;
      row_off   <= '0;
      col       <= '0;
      wp        <= 1'b0;
      rp        <= 1'b0;
      bcnt      <= '0;
      line_done <= 1'b0;
    end else if (line_start) begin
      active    <= 1'b1;
      ptr       <= thr_base + row_off + THR_AW'(col);
      ret_valid <= 1'b0;
      pushed    <= '0;
      wp        <= 1'b0;
      rp        <= 1'b0;
      bcnt      <= '0;
      line_done <= 1'b0;
    end else begin
      line_done <= 1'b0;
      ret_valid <= sram_re;
      if (sram_re) begin
        ret_addr <= eff_ptr;
        ptr      <= eff_ptr + THR_AW'(1);
      end else if (ret_vec) begin
        ptr      <= eff_ptr;
      end
      if (ret_pair) begin
        buf_q[wp] <= sram_rdata[PW-1:0];
        wp        <= ~wp;
        pushed    <= pushed + DIM_W'(1);
        if (pushed + DIM_W'(1) == line_groups) begin
          active    <= 1'b0;
          line_done <= 1'b1;
          // move the scanline start one tile row down
          if (row + DIM_W'(1) >= tile_rows) begin
            logic [DIM_W:0] c;
            c        = {1'b0, col} + {1'b0, tile_shift};
            if (c >= {1'b0, tile_cols}) c = c - {1'b0, tile_cols};
            row     <= '0;
            row_off <= '0;
            col     <= c[DIM_W-1:0];
          end else begin
            row     <= row + DIM_W'(1);
            row_off <= row_off + THR_AW'(row_pitch);
          end
        end
      end
      if (pop) rp <= ~rp;
      bcnt <= bcnt + 2'(ret_pair) - 2'(pop);
    end
  end

  // The buffer never overflows, and a line never gets more groups than
  // it asked for.
  a_buf_bound: assert property (@(posedge clk) disable iff (!rst_n)
    bcnt <= 2'd2);
  a_line_bound: assert property (@(posedge clk) disable iff (!rst_n)
    active |-> pushed < line_groups);

endmodule
