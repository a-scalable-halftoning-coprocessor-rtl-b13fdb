// tb_threshold_fetch: walks a slanted 3-row tile stored with displacement
// vectors (each row: its groups, a forward vector to a second copy of the
// row, in row 1 a second vector chained to the first, and a backward vector
// closing the loop) through many scanlines. Checks every threshold group
// against the tile model (row y mod 3, column shifted by 2 groups at every
// wrap), and the rate: with groups taken on every clock, the clocks without
// a valid group between the first and the last group of a line must equal
// the number of vectors followed, i.e. one group per clock plus one clock
// per vector. A second pass takes groups at random.
module tb_threshold_fetch;
  import ht_pkg::*;

  localparam int L = 2, TR = 3, TC = 5, TS = 2, PITCH = 2 * TC + 6, BASE = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic page_start = 0, line_start = 0, thr_take = 0;
  logic [DIM_W-1:0] line_groups = 1;
  logic [THR_AW-1:0] thr_base = BASE;
  logic [DIM_W-1:0] row_pitch = PITCH, tile_rows = TR, tile_cols = TC, tile_shift = TS;
  logic sram_re;
  logic [THR_AW-1:0] sram_addr;
  logic [16:0] sram_rdata;
  logic thr_valid, vec_hit, line_done;
  gray_t thr [L];
  logic [16:0] mem [256];
  int vec_total = 0;

  threshold_fetch dut (.*);

  always @(posedge clk) if (sram_re) sram_rdata <= mem[sram_addr[7:0]];

  function automatic int tv(int row, int col, int lane);
    return (row * 61 + col * 23 + lane * 131 + 5) & 255;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int copy;
    for (int r = 0; r < TR; r++) begin
      int b;
      b = BASE + r * PITCH;
      copy = (r == 1) ? TC + 5 : TC + 2;
      for (int c = 0; c < TC; c++) begin
        mem[b + c]        = {1'b0, 8'(tv(r, c, 1)), 8'(tv(r, c, 0))};
        mem[b + copy + c] = {1'b0, 8'(tv(r, c, 1)), 8'(tv(r, c, 0))};
      end
      mem[b + TC] = {1'b1, 16'(2)};
      if (r == 1) mem[b + TC + 2] = {1'b1, 16'(3)};
      mem[b + copy + TC] = {1'b1, 16'(-(copy + TC))};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); page_start = 1;
      @(negedge clk); page_start = 0;
      for (int y = 0; y < 14; y++) begin
        int g, n, bubbles, vecs, row, c0;
        bit started;
        g = (pass == 0) ? 23 : $urandom_range(1, 30);
        row = y % TR; c0 = ((y / TR) * TS) % TC;
        @(negedge clk); line_groups = DIM_W'(g); line_start = 1;
        @(negedge clk); line_start = 0;
        n = 0; bubbles = 0; vecs = 0; started = 0;
        while (n < g) begin
          thr_take = (pass == 0) || ($urandom_range(0, 1) == 0);
          #1;
          if (vec_hit) vecs++;
          if (started && !thr_valid) bubbles++;
          if (thr_valid && thr_take) begin
            started = 1;
            for (int i = 0; i < L; i++)
              chk(int'(thr[i]) == tv(row, (c0 + n) % TC, i),
                  $sformatf("line %0d group %0d lane %0d", y, n, i));
            n++;
          end
          @(negedge clk);
        end
        thr_take = 0;
        vec_total += vecs;
        if (pass == 0)
          chk(bubbles == vecs, $sformatf("line %0d: %0d idle clocks, %0d vectors", y, bubbles, vecs));
        repeat (2) @(negedge clk);
        chk(!thr_valid, "no surplus group");
      end
    end
    chk(vec_total > 20, "vectors followed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
