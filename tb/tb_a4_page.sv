// tb_a4_page: halftones whole A4 pages on the subsystem at its default
// parameters, at the four output resolutions of the design's A4 timing
// study: 300 dpi from a 150 dpi source (d/s = 2/1, 2480 x 3508 output
// pixels), 600 dpi from 150 dpi (d/s = 4/1, 4961 x 7016), 800 dpi from
// 200 dpi (d/s = 4/1, 6614 x 9354) and 1200 dpi from 300 dpi (d/s = 4/1,
// 9921 x 14031). The tile is a 24 x 6 threshold rectangle slanted by 8
// cells per wrap and stored with a closing vector per row. The host answers
// IRQ_A at once; the output device reads whenever the FIFO is not empty.
// Every byte is checked against a reference bitmap, and the clocks from
// START to done must stay within the page time the design is expected to
// reach with two comparators at 20 MHz: 0.25 s, 1.0 s, 1.8 s and 4.0 s
// (5, 20, 36 and 80 million clocks).
module tb_a4_page;
  import ht_pkg::*;

  int DW, DH, SD, SS, BPL;
  localparam int TW = 24, TR = 6, TSH = 8;
  localparam int TC = TW / 2, TS = TSH / 2, PITCH = TC + 1, BASE = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        hwrite = 0;
  logic [3:0]  haddr = 0;
  logic [15:0] hwdata = 0, hrdata;
  logic        hsrc_we = 0, hsrc_re = 0;
  logic [SRC_AW-1:0] hsrc_addr = 0;
  logic [31:0] hsrc_wdata = 0, hsrc_rdata;
  logic        hthr_we = 0;
  logic [THR_AW-1:0] hthr_addr = 0;
  logic [16:0] hthr_wdata = 0;
  logic        dev_rd, dev_empty;
  logic [7:0]  dev_data;
  logic        irq_a, irq_b, in_req, out_full, busy, done;

  halftone_system dut (.*);

  int checks = 0, failures = 0, got = 0;
  int mapx [];
  int mapy [];
  int src_w, src_h;
  longint page_clocks = 0;

  function automatic int tv(int row, int cx);
    return (row * 83 + cx * 37 + 9) & 255;
  endfunction
  function automatic int gv(int x, int y);
    return (x * 7 + y * 5 + ((x ^ y) & 63)) & 255;
  endfunction
  function automatic int exp_byte(int y, int b);
    int v;
    v = 0;
    for (int k = 0; k < 8; k++) begin
      int x, bv;
      x = b * 8 + k;
      bv = 0;
      if (x < DW) bv = gv(mapx[x], mapy[y]) < tv(y % TR, ((y / TR) * TSH + x) % TW) ? 1 : 0;
      v = (v << 1) | bv;
    end
    return v;
  endfunction

  task automatic reg_wr(logic [3:0] a, logic [15:0] d);
    @(negedge clk); hwrite = 1; haddr = a; hwdata = d;
    @(negedge clk); hwrite = 0;
  endtask

  assign dev_rd = !dev_empty;
  always @(posedge clk) begin
    if (busy) page_clocks++;
    if (dev_rd && rst_n) begin
      checks++;
      if (dev_data != 8'(exp_byte(got / BPL, got % BPL))) begin
        failures++;
        if (failures < 10) $display("FAIL: line %0d byte %0d", got / BPL, got % BPL);
      end
      got++;
    end
  end

  task automatic run_page(int dw, int dh, int d, int s, longint budget, string name);
    int e, sent;
    DW = dw; DH = dh; SD = d; SS = s; BPL = (dw + 7) / 8;
    mapx = new[DW]; mapy = new[DH];
    e = -((SD - SS) / 2); mapx[0] = 0;
    for (int k = 1; k < DW; k++) begin
      e = (e < 0) ? e + SS : e - (SD - SS);
      mapx[k] = mapx[k-1] + (e >= 0 ? 1 : 0);
    end
    e = -((SD - SS) / 2); mapy[0] = 0;
    for (int k = 1; k < DH; k++) begin
      e = (e < 0) ? e + SS : e - (SD - SS);
      mapy[k] = mapy[k-1] + (e >= 0 ? 1 : 0);
    end
    src_w = mapx[DW-1] + 1; src_h = mapy[DH-1] + 1;
    got = 0; page_clocks = 0;
    reg_wr(REG_DST_W, 16'(DW));
    reg_wr(REG_DST_H, 16'(DH));
    reg_wr(REG_SCALE_D, 16'(SD));
    reg_wr(REG_SCALE_S, 16'(SS));
    reg_wr(REG_SRC_H, 16'(src_h));
    reg_wr(REG_THR_BASE_L, 16'(BASE));
    reg_wr(REG_THR_BASE_H, 16'(0));
    reg_wr(REG_ROW_PITCH, 16'(PITCH));
    reg_wr(REG_TILE_ROWS, 16'(TR));
    reg_wr(REG_TILE_COLS, 16'(TC));
    reg_wr(REG_TILE_SHIFT, 16'(TS));
    reg_wr(REG_CTRL, 16'(1 << CMD_START));
    while (!busy) @(negedge clk);
    sent = 0;
    while (!done) begin
      @(negedge clk);
      if (irq_a && sent < src_h) begin
        for (int w = 0; w < (src_w + 3) / 4; w++) begin
          logic [31:0] word;
          for (int p = 0; p < 4; p++) word[p*8 +: 8] = 8'(gv(w * 4 + p, sent));
          hsrc_we = 1; hsrc_addr = SRC_AW'((sent % 2) * 1024 + w); hsrc_wdata = word;
          @(negedge clk);
        end
        hsrc_we = 0;
        reg_wr(REG_CTRL, 16'(1 << CMD_LINE_READY));
        sent++;
        repeat (2) @(negedge clk);
      end
    end
    repeat (20) @(negedge clk);
    checks++; if (got != DH * BPL) begin failures++; $display("FAIL: %0d bytes of %0d", got, DH * BPL); end
    checks++;
    if (page_clocks > budget) begin failures++; $display("FAIL: page took %0d clocks", page_clocks); end
    $display("A4 %s: %0d clocks = %0.3f s at 20 MHz, %0d bytes", name, page_clocks, real'(page_clocks) / 20.0e6, got);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < TR; r++) begin
      for (int c = 0; c < TC; c++) begin
        @(negedge clk); hthr_we = 1; hthr_addr = THR_AW'(BASE + r * PITCH + c);
        hthr_wdata = {1'b0, 8'(tv(r, 2 * c + 1)), 8'(tv(r, 2 * c))};
      end
      @(negedge clk); hthr_addr = THR_AW'(BASE + r * PITCH + TC); hthr_wdata = {1'b1, 16'(-TC)};
    end
    @(negedge clk); hthr_we = 0;
    run_page(2480, 3508, 2, 1, 5000000, "300 dpi");
    run_page(4961, 7016, 4, 1, 20000000, "600 dpi");
    run_page(6614, 9354, 4, 1, 36000000, "800 dpi");
    run_page(9921, 14031, 4, 1, 80000000, "1200 dpi");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bytes", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
