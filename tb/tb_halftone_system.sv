// tb_halftone_system: end-to-end test of the halftoning subsystem at its
// default parameters (two comparators, 2048-word source buffer, 2^20-word
// threshold SRAM, 1024-byte output FIFO).
//
// A host model programs the registers, loads a slanted dither tile into the
// threshold SRAM (every tile row ends in a forward vector to a second copy
// of the row, whose own end vector jumps back, so both vector directions
// are followed), starts a page and answers every IRQ_A with the next source
// scanline after a random delay. An output-device model first leaves the
// FIFO alone until it has been full for a while, then reads with random
// gaps. Every byte read is compared with a bitmap computed here from the
// error-term recurrence, the Holladay tile walk and the rule "gray below
// threshold gives a black (1) pixel". The test also checks the page's
// groups-per-clock rate on lines that saw no output stall, and counts the
// mechanisms exercised: vectors, output-full stalls, waits for source
// lines, IRQ_A/IRQ_B, tile-row wraps, source pixel and scanline reuse,
// padded line ends. The page is 101 pixels wide, so every line also ends in
// a half-used group.
module tb_halftone_system;
  import ht_pkg::*;

  localparam int DW = 101, DH = 120;       // output page
  localparam int SD = 19, SS = 11;         // scale 19/11 (the worked example)
  localparam int TR = 5, TC = 6, TS = 2;   // tile rows, groups per row, shift
  localparam int PITCH = 2 * TC + 4;
  localparam int BASE = 1000;
  localparam int BPL = (DW + 7) / 8;

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
  logic        dev_rd = 0, dev_empty;
  logic [7:0]  dev_data;
  logic        irq_a, irq_b, in_req, out_full, busy, done;

  halftone_system dut (.*);

  int checks = 0, failures = 0;
  int mapx [DW];
  int mapy [DH];
  int src_w, src_h;
  int cycles = 0;

  function automatic int thr_val(int row, int col, int lane);
    return (row * 53 + col * 29 + lane * 97 + 7) & 255;
  endfunction
  function automatic int gray_val(int x, int y);
    return (x * 37 + y * 71 + x * y * 3 + 11) & 255;
  endfunction
  function automatic int exp_byte(int y, int b);
    int v = 0;
    for (int k = 0; k < 8; k++) begin
      int x = b * 8 + k;
      int bit_v = 0;
      if (x < DW) begin
        int row = y % TR;
        int col = ((y / TR) * TS + x / 2) % TC;
        bit_v = gray_val(mapx[x], mapy[y]) < thr_val(row, col, x % 2) ? 1 : 0;
      end
      v = (v << 1) | bit_v;
    end
    return v;
  endfunction

  task automatic map_axis(int n, output int idx []);
    int e = -((SD - SS) / 2);
    idx = new[n];
    idx[0] = 0;
    for (int k = 1; k < n; k++) begin
      e = (e < 0) ? e + SS : e - (SD - SS);
      idx[k] = idx[k-1] + ((e >= 0) ? 1 : 0);
    end
  endtask

  task automatic reg_wr(logic [3:0] a, logic [15:0] d);
    @(negedge clk); hwrite = 1; haddr = a; hwdata = d;
    @(negedge clk); hwrite = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_vec = 0, n_out_stall = 0, n_in_wait = 0, n_irq_a = 0, n_irq_b = 0;
  int n_tile_wrap = 0, n_hreuse = 0, n_vreuse = 0, n_vadv = 0;
  logic irq_a_q = 0, irq_b_q = 0;
  int run_cyc = 0, line_vec = 0, line_stall = 0, line_fires = 0;
  int worst_overhead = 0;
  always @(posedge clk) begin
    cycles++;
    irq_a_q <= irq_a; irq_b_q <= irq_b;
    if (irq_a && !irq_a_q) n_irq_a++;
    if (irq_b && !irq_b_q) n_irq_b++;
    if (dut.u_core.vec_hit) n_vec++;
    if (dut.u_core.out_we && out_full) n_out_stall++;
    if (in_req) n_in_wait++;
    if (dut.u_core.fire && !dut.u_core.u_gray.first &&
        dut.u_core.u_gray.adv != '1) n_hreuse++;
    if (dut.u_core.u_seq.state == dut.u_core.u_seq.S_NEXT &&
        dut.u_core.dst_y + 1 < DH) begin
      if (dut.u_core.u_seq.v_adv) n_vadv++; else n_vreuse++;
    end
    if (dut.u_core.thr_line_done && dut.u_core.u_thr.row == TR - 1) n_tile_wrap++;
    // rate: per line, clocks spent in RUN against groups compared
    if (dut.u_core.running) begin
      run_cyc++;
      if (dut.u_core.vec_hit) line_vec++;
      if (out_full) line_stall++;
      if (dut.u_core.fire) line_fires++;
    end else if (run_cyc != 0) begin
      if (line_stall == 0 && run_cyc - line_fires - line_vec > worst_overhead)
        worst_overhead = run_cyc - line_fires - line_vec;
      run_cyc = 0; line_vec = 0; line_stall = 0; line_fires = 0;
    end
  end

  // ---------------- host ----------------
  int rows_sent = 0;
  task automatic send_row(int j);
    int words = (src_w + 3) / 4;
    for (int w = 0; w < words; w++) begin
      logic [31:0] word = '0;
      for (int p = 0; p < 4; p++) word[p*8 +: 8] = 8'(gray_val(w * 4 + p, j));
      @(negedge clk);
      hsrc_we = 1; hsrc_addr = SRC_AW'((j % 2) * 1024 + w); hsrc_wdata = word;
    end
    @(negedge clk); hsrc_we = 0;
    reg_wr(REG_CTRL, 16'(1 << CMD_LINE_READY));
    repeat (3) @(negedge clk);
  endtask

  initial begin : host
    int ix [];
    int iy [];
    map_axis(DW, ix);
    map_axis(DH, iy);
    for (int i = 0; i < DW; i++) mapx[i] = ix[i];
    for (int i = 0; i < DH; i++) mapy[i] = iy[i];
    src_w = mapx[DW-1] + 1;
    src_h = mapy[DH-1] + 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // threshold array: row r at BASE + r*PITCH
    for (int r = 0; r < TR; r++) begin
      for (int c = 0; c < TC; c++) begin
        logic [16:0] wv;
        wv = {1'b0, 8'(thr_val(r, c, 1)), 8'(thr_val(r, c, 0))};
        @(negedge clk); hthr_we = 1; hthr_addr = THR_AW'(BASE + r * PITCH + c); hthr_wdata = wv;
        @(negedge clk); hthr_addr = THR_AW'(BASE + r * PITCH + TC + 3 + c);
      end
      @(negedge clk); hthr_addr = THR_AW'(BASE + r * PITCH + TC);
      hthr_wdata = {1'b1, 16'(3)};
      @(negedge clk); hthr_addr = THR_AW'(BASE + r * PITCH + 2 * TC + 3);
      hthr_wdata = {1'b1, 16'(-(2 * TC + 3))};
    end
    @(negedge clk); hthr_we = 0;
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
    @(negedge clk); haddr = REG_DST_W;
    #1 checks++; if (hrdata != 16'(DW)) begin failures++; $display("FAIL: register readback"); end
    reg_wr(REG_CTRL, 16'(1 << CMD_START));
    while (rows_sent < src_h) begin
      @(negedge clk);
      if (irq_a) begin
        repeat ($urandom_range(0, 60)) @(negedge clk);
        send_row(rows_sent);
        rows_sent++;
      end
    end
  end

  // ---------------- output device ----------------
  int got = 0;
  initial begin : device
    int full_seen = 0;
    wait (rst_n);
    wait (busy);
    while (full_seen < 50) begin
      @(negedge clk);
      if (out_full) full_seen++;
    end
    while (got < DH * BPL) begin
      @(negedge clk);
      dev_rd = 0;
      if (!dev_empty && (irq_b || done) && $urandom_range(0, 3) != 0) begin
        int e;
        e = exp_byte(got / BPL, got % BPL);
        checks++;
        if (dev_data != 8'(e)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: line %0d byte %0d got %02x expected %02x",
                     got / BPL, got % BPL, dev_data, e);
        end
        dev_rd = 1;
        got++;
      end
    end
    @(negedge clk); dev_rd = 0;
    repeat (20) @(negedge clk);
    checks++; if (!done || busy) begin failures++; $display("FAIL: page not done"); end
    checks++; if (!dev_empty) begin failures++; $display("FAIL: extra output bytes"); end
    @(negedge clk); haddr = REG_CTRL;
    #1 checks++; if (hrdata[ST_DONE] != 1'b1) begin failures++; $display("FAIL: status done bit"); end
    // rate: one group per clock plus one clock per vector, plus line start-up
    checks++;
    if (worst_overhead > 4) begin
      failures++; $display("FAIL: per-line overhead %0d clocks", worst_overhead);
    end
    begin
      int counts [9];
      string names [9];
      counts = '{n_vec, n_out_stall, n_in_wait, n_irq_a, n_irq_b,
                         n_tile_wrap, n_hreuse, n_vreuse, n_vadv};
      names = '{"vector", "output_full_stall", "input_wait", "irq_a",
                           "irq_b", "tile_row_wrap", "source_pixel_reuse",
                           "source_line_reuse", "source_line_advance"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %s: %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL: %s never happened", names[i]); end
      end
    end
    $display("cycles=%0d bytes=%0d worst_line_overhead=%0d", cycles, got, worst_overhead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bytes received", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
