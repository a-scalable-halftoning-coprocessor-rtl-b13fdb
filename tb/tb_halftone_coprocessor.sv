// tb_halftone_coprocessor: the coprocessor in its scaled four-comparator
// form (LANES = 4), with the source buffer, threshold SRAM and output FIFO
// modelled here as plain arrays. The page enlarges every source pixel to
// 5 x 5 output pixels (d/s = 5/1). The host model answers IRQ_A with source
// rows; the output side accepts bytes on most clocks but sometimes reports
// the FIFO full. Every byte is compared with a bitmap computed here, and on
// lines without a full FIFO the line time must be one clock per four-pixel
// group, plus one clock per vector, plus at most four clocks of line start.
module tb_halftone_coprocessor;
  import ht_pkg::*;

  localparam int L = 4, THR_W = 1 + 8 * L;
  localparam int DW = 96, DH = 40, SD = 5, SS = 1;
  localparam int TR = 4, TC = 3, TS = 1, PITCH = TC + 1, BASE = 7;
  localparam int BPL = (DW + 7) / 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hwrite = 0;
  logic [3:0] haddr = 0;
  logic [15:0] hwdata = 0, hrdata;
  logic src_re, thr_re, out_we, irq_a, irq_b, in_req, busy, done;
  logic [SRC_AW-1:0] src_addr;
  logic [31:0] src_rdata;
  logic [THR_AW-1:0] thr_addr;
  logic [THR_W-1:0] thr_rdata;
  logic [7:0] out_data;
  logic out_full = 0, out_half_full = 0, out_empty = 1;

  halftone_coprocessor #(.LANES(L)) dut (.*);

  logic [31:0] srcmem [2048];
  logic [THR_W-1:0] thrmem [64];
  always @(posedge clk) if (src_re) src_rdata <= srcmem[src_addr];
  always @(posedge clk) if (thr_re) thr_rdata <= thrmem[thr_addr[5:0]];

  int mapx [DW];
  int mapy [DH];
  int src_w, src_h;

  function automatic int tv(int row, int col, int lane);
    return (row * 89 + col * 41 + lane * 67 + 3) & 255;
  endfunction
  function automatic int gv(int x, int y);
    return (x * 53 + y * 29 + 17) & 255;
  endfunction
  function automatic int exp_byte(int y, int b);
    int v;
    v = 0;
    for (int k = 0; k < 8; k++) begin
      int x, bv;
      x = b * 8 + k;
      bv = 0;
      if (x < DW)
        bv = gv(mapx[x], mapy[y]) < tv(y % TR, ((y / TR) * TS + x / L) % TC, x % L) ? 1 : 0;
      v = (v << 1) | bv;
    end
    return v;
  endfunction

  task automatic reg_wr(logic [3:0] a, logic [15:0] d);
    @(negedge clk); hwrite = 1; haddr = a; hwdata = d;
    @(negedge clk); hwrite = 0;
  endtask

  // output side: a byte is taken whenever the FIFO is not reported full
  int got = 0;
  always @(negedge clk) out_full <= ($urandom_range(0, 1) == 0) && (got / BPL) % 5 == 2;
  always @(posedge clk) if (out_we && !out_full && rst_n) begin
    int e;
    e = exp_byte(got / BPL, got % BPL);
    checks++;
    if (out_data != 8'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL: line %0d byte %0d got %02x expected %02x", got / BPL, got % BPL, out_data, e);
    end
    got++;
  end

  // line timing
  int run_cyc = 0, lvec = 0, lstall = 0, lfire = 0, worst = 0, nvec = 0, nstall = 0, ngood = 0;
  always @(posedge clk) begin
    if (dut.running) begin
      run_cyc++;
      if (dut.vec_hit) begin lvec++; nvec++; end
      if (out_full) begin lstall++; nstall++; end
      if (dut.fire) lfire++;
    end else if (run_cyc != 0) begin
      if (lstall == 0) begin
        ngood++;
        if (run_cyc - lfire - lvec > worst) worst = run_cyc - lfire - lvec;
      end
      run_cyc = 0; lvec = 0; lstall = 0; lfire = 0;
    end
  end

  initial begin
    int e, sent;
    e = -((SD - SS) / 2); mapx[0] = 0;
    for (int k = 1; k < DW; k++) begin
      e = (e < 0) ? e + SS : e - (SD - SS);
      mapx[k] = mapx[k-1] + (e >= 0 ? 1 : 0);
    end
    for (int k = 0; k < DH; k++) mapy[k] = mapx[k];
    src_w = mapx[DW-1] + 1; src_h = mapy[DH-1] + 1;
    for (int r = 0; r < TR; r++) begin
      for (int c = 0; c < TC; c++)
        for (int i = 0; i < L; i++) thrmem[BASE + r * PITCH + c][i*8 +: 8] = 8'(tv(r, c, i));
      for (int c = 0; c < TC; c++) thrmem[BASE + r * PITCH + c][THR_W-1] = 1'b0;
      thrmem[BASE + r * PITCH + TC] = {1'b1, 32'(-TC)};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
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
    sent = 0;
    while (!done) begin
      @(negedge clk);
      if (irq_a && sent < src_h) begin
        for (int w = 0; w < (src_w + 3) / 4; w++)
          for (int p = 0; p < 4; p++) srcmem[(sent % 2) * 1024 + w][p*8 +: 8] = 8'(gv(w * 4 + p, sent));
        repeat ($urandom_range(0, 10)) @(negedge clk);
        reg_wr(REG_CTRL, 16'(1 << CMD_LINE_READY));
        sent++;
        repeat (2) @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);
    checks++; if (got != DH * BPL) begin failures++; $display("FAIL: %0d bytes, expected %0d", got, DH * BPL); end
    checks++; if (worst > 4) begin failures++; $display("FAIL: line overhead %0d clocks", worst); end
    checks++; if (nvec == 0 || nstall == 0 || ngood == 0) begin failures++; $display("FAIL: vectors %0d stalls %0d", nvec, nstall); end
    haddr = REG_CTRL; #1;
    checks++; if (hrdata[ST_DONE] != 1 || hrdata[ST_BUSY] != 0) begin failures++; $display("FAIL: status"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bytes", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
