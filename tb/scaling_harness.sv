// scaling_harness: one halftone_coprocessor with LANES comparators and
// array models of its memories, used to compare the 2-, 4- and
// 8-comparator architectures on the same page.
//
// On 'go' it programs a page of dw x dh output pixels at scale d/s, answers
// IRQ_A at once with source rows, accepts every output byte (the FIFO is
// never full) and checks each byte against a reference bitmap. The dither
// tile is 24 cells wide and 4 rows high, slanted by 8 cells per wrap, and is
// stored as 24/LANES groups per row closed by a backward vector, so every
// lane count produces the same bitmap. It reports the clocks spent
// comparing (RUN state), the groups compared, the vectors followed and the
// number of wrong bytes.
module scaling_harness
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  int          dw,
  input  int          dh,
  input  int          d,
  input  int          s,
  output logic        finished,
  output int          run_clocks,
  output int          groups,
  output int          vectors,
  output int          bad_bytes,
  output int          bytes
);

  localparam int THR_W = 1 + 8 * LANES;
  localparam int TW = 24, TR = 4, TSH = 8;
  localparam int TC = TW / LANES, TS = TSH / LANES, PITCH = TC + 1, BASE = 16;

  logic hwrite = 0;
  logic [3:0] haddr = 0;
  logic [15:0] hwdata = 0, hrdata;
  logic src_re, thr_re, out_we, irq_a, irq_b, in_req, busy, done;
  logic [SRC_AW-1:0] src_addr;
  logic [31:0] src_rdata;
  logic [THR_AW-1:0] thr_addr;
  logic [THR_W-1:0] thr_rdata;
  logic [7:0] out_data;

  halftone_coprocessor #(.LANES(LANES)) dut (
    .clk, .rst_n, .hwrite, .haddr, .hwdata, .hrdata,
    .src_re, .src_addr, .src_rdata, .thr_re, .thr_addr, .thr_rdata,
    .out_we, .out_data, .out_full(1'b0), .out_half_full(1'b0), .out_empty(1'b1),
    .irq_a, .irq_b, .in_req, .busy, .done
  );

  logic [31:0] srcmem [2048];
  logic [THR_W-1:0] thrmem [256];
  always @(posedge clk) if (src_re) src_rdata <= srcmem[src_addr];
  always @(posedge clk) if (thr_re) thr_rdata <= thrmem[thr_addr[7:0]];

  int mapx [], mapy [];
  int bpl;

  function automatic int tv(int row, int cx);
    return (row * 97 + cx * 43 + 21) & 255;
  endfunction
  function automatic int gv(int x, int y);
    return (x * 59 + y * 31 + x * y + 5) & 255;
  endfunction
  function automatic int exp_byte(int y, int b);
    int v;
    v = 0;
    for (int k = 0; k < 8; k++) begin
      int x, bv;
      x = b * 8 + k;
      bv = 0;
      if (x < dw)
        bv = gv(mapx[x], mapy[y]) < tv(y % TR, ((y / TR) * TSH + x) % TW) ? 1 : 0;
      v = (v << 1) | bv;
    end
    return v;
  endfunction

  task automatic reg_wr(logic [3:0] a, logic [15:0] v);
    @(negedge clk); hwrite = 1; haddr = a; hwdata = v;
    @(negedge clk); hwrite = 0;
  endtask

  always @(posedge clk) begin
    if (out_we && !finished) begin
      if (out_data != 8'(exp_byte(bytes / bpl, bytes % bpl))) bad_bytes++;
      bytes++;
    end
    if (dut.running) run_clocks++;
    if (dut.fire) groups++;
    if (dut.vec_hit) vectors++;
  end

  initial begin
    finished = 1;
    run_clocks = 0; groups = 0; vectors = 0; bad_bytes = 0; bytes = 0; bpl = 1;
    for (int r = 0; r < TR; r++) begin
      for (int c = 0; c < TC; c++) begin
        for (int i = 0; i < LANES; i++) thrmem[BASE + r * PITCH + c][i*8 +: 8] = 8'(tv(r, c * LANES + i));
        thrmem[BASE + r * PITCH + c][THR_W-1] = 1'b0;
      end
      thrmem[BASE + r * PITCH + TC] = '0;
      thrmem[BASE + r * PITCH + TC][THR_W-1] = 1'b1;
      thrmem[BASE + r * PITCH + TC][31:0] = 32'(-TC);
    end
    forever begin
      int e, src_w, src_h, sent;
      @(posedge clk);
      if (go) begin
        finished = 0;
        run_clocks = 0; groups = 0; vectors = 0; bad_bytes = 0; bytes = 0;
        bpl = (dw + 7) / 8;
        mapx = new[dw]; mapy = new[dh];
        e = -((d - s) / 2); mapx[0] = 0;
        for (int k = 1; k < dw; k++) begin
          e = (e < 0) ? e + s : e - (d - s);
          mapx[k] = mapx[k-1] + (e >= 0 ? 1 : 0);
        end
        for (int k = 0; k < dh; k++) mapy[k] = (k < dw) ? mapx[k] : 0;
        src_w = mapx[dw-1] + 1; src_h = mapy[dh-1] + 1;
        reg_wr(REG_DST_W, 16'(dw));
        reg_wr(REG_DST_H, 16'(dh));
        reg_wr(REG_SCALE_D, 16'(d));
        reg_wr(REG_SCALE_S, 16'(s));
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
            for (int w = 0; w < (src_w + 3) / 4; w++)
              for (int p = 0; p < 4; p++) srcmem[(sent % 2) * 1024 + w][p*8 +: 8] = 8'(gv(w * 4 + p, sent));
            reg_wr(REG_CTRL, 16'(1 << CMD_LINE_READY));
            sent++;
            @(negedge clk);
          end
        end
        finished = 1;
      end
    end
  end

endmodule
