// tb_sequencer: runs pages through the sequencer with a host model that
// answers IRQ_A after random delays and a datapath model that compares
// groups at random. Checks, for every output scanline, that it starts only
// once its source row has been supplied, that it uses the source row and
// slot given by the reference error-term recurrence, that exactly
// ceil(ImDstW/LANES) groups are compared before the flush, that only the
// lanes inside the line are enabled in a partial last group, that IRQ_A asks for
// exactly the rows of the page, that the page ends with done, and that
// in_req (InputBufferRequest) is seen while the host is slow.
module tb_sequencer;
  import ht_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic cmd_start = 0, cmd_line_ready = 0, cmd_abort = 0;
  logic fire = 0, sr_empty = 1, pk_idle = 1;
  logic page_start, line_start, running, flush, busy, done, irq_a, in_req;
  logic [SRC_AW-1:0] slot_base;
  logic [DIM_W-1:0] line_groups, scale_r, dst_y, src_row;
  logic [1:0] lane_mask;
  int partial = 0;
  logic signed [EPS_W-1:0] eps0;

  sequencer dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int supplied = 0, lines = 0, fires_in_line = 0, in_wait = 0;
  int mapy [];
  int dw_cur = 0;

  // datapath model: compare groups while running, flush takes a few clocks
  always @(negedge clk) begin
    fire     <= running && ($urandom_range(0, 3) != 0) && fires_in_line < int'(line_groups);
    sr_empty <= !flush || ($urandom_range(0, 2) == 0);
  end
  always @(posedge clk) begin
    if (fire) begin
      chk(lane_mask == ((dw_cur % 2 == 1 && fires_in_line == int'(line_groups) - 1) ? 2'b01 : 2'b11),
          $sformatf("lane mask in group %0d", fires_in_line));
      if (lane_mask != 2'b11) partial++;
      fires_in_line++;
    end
    if (in_req) in_wait++;
    if (line_start) begin
      chk(supplied > int'(src_row), $sformatf("line %0d started before row %0d was supplied", lines, src_row));
      chk(int'(src_row) == mapy[lines], $sformatf("line %0d uses row %0d, expected %0d", lines, src_row, mapy[lines]));
      chk(slot_base == SRC_AW'((mapy[lines] % 2) * 1024), $sformatf("line %0d slot", lines));
      lines++;
    end
    if (flush && running == 0 && fires_in_line != 0) begin
      chk(fires_in_line == int'(line_groups), $sformatf("line %0d compared %0d groups", lines - 1, fires_in_line));
      fires_in_line = 0;
    end
  end

  task automatic page(int dw, int dh, int d, int s);
    int e, srch;
    mapy = new[dh];
    e = -((d - s) / 2); mapy[0] = 0;
    for (int k = 1; k < dh; k++) begin
      e = (e < 0) ? e + s : e - (d - s);
      mapy[k] = mapy[k-1] + (e >= 0 ? 1 : 0);
    end
    srch = mapy[dh-1] + 1;
    cfg = '0;
    cfg.dst_w = DIM_W'(dw); cfg.dst_h = DIM_W'(dh);
    cfg.scale_d = DIM_W'(d); cfg.scale_s = DIM_W'(s); cfg.src_h = DIM_W'(srch);
    supplied = 0; lines = 0; dw_cur = dw;
    @(negedge clk); cmd_start = 1;
    @(negedge clk); cmd_start = 0;
    chk(line_groups == DIM_W'((dw + 1) / 2), "line_groups");
    chk(int'(eps0) == -((d - s) / 2), "eps0 = -r/2");
    while (!done) begin
      @(negedge clk);
      if (irq_a && supplied < srch) begin
        repeat ($urandom_range(0, 40)) @(negedge clk);
        cmd_line_ready = 1; supplied++;
        @(negedge clk); cmd_line_ready = 0;
        @(negedge clk);
      end
    end
    chk(lines == dh, $sformatf("%0d lines started, expected %0d", lines, dh));
    chk(supplied == srch, $sformatf("%0d rows asked for, expected %0d", supplied, srch));
    chk(!busy && !irq_a, "idle after page");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    page(40, 30, 19, 11);
    page(16, 25, 5, 1);
    page(24, 20, 1, 1);
    page(33, 12, 3, 2);
    chk(partial > 0, "partial last group seen");
    chk(in_wait > 0, "InputBufferRequest seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
