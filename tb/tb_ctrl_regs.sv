// tb_ctrl_regs: writes every configuration register and reads it back,
// checks that writes are ignored while busy, that REG_CTRL writes give
// one-clock command strobes (START only when idle) and that a REG_CTRL read
// returns the status bits.
module tb_ctrl_regs;
  import ht_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hwrite = 0, busy = 0;
  logic [3:0] haddr = 0;
  logic [15:0] hwdata = 0, hrdata;
  logic [7:0] status = 0;
  cfg_t cfg;
  logic cmd_start, cmd_line_ready, cmd_abort;
  logic [15:0] shadow [16];

  ctrl_regs dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(int a, logic [15:0] d);
    @(negedge clk); hwrite = 1; haddr = 4'(a); hwdata = d;
    @(negedge clk); hwrite = 0;
  endtask

  function automatic logic [15:0] mask(int a, logic [15:0] d);
    return (a == REG_THR_BASE_H) ? (d & 16'h000f) : d;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      busy = (round == 1);
      for (int a = 1; a <= 11; a++) begin
        logic [15:0] d;
        d = 16'($urandom);
        wr(a, d);
        if (!busy) shadow[a] = mask(a, d);
      end
      for (int a = 1; a <= 11; a++) begin
        @(negedge clk); haddr = 4'(a); #1;
        chk(hrdata == shadow[a], $sformatf("reg %0d readback round %0d", a, round));
      end
      chk(cfg.dst_w == shadow[REG_DST_W] && cfg.scale_s == shadow[REG_SCALE_S] &&
          cfg.thr_base == {shadow[REG_THR_BASE_H][3:0], shadow[REG_THR_BASE_L]} &&
          cfg.tile_shift == shadow[REG_TILE_SHIFT], "cfg outputs");
    end
    // command strobes
    busy = 0;
    for (int b = 0; b < 3; b++) begin
      int seen;
      seen = 0;
      @(negedge clk); hwrite = 1; haddr = REG_CTRL; hwdata = 16'(1 << b);
      @(negedge clk); hwrite = 0;
      chk({cmd_abort, cmd_line_ready, cmd_start} == 3'(1 << b), $sformatf("strobe %0d", b));
      @(negedge clk);
      chk({cmd_abort, cmd_line_ready, cmd_start} == 3'b000, $sformatf("strobe %0d length", b));
    end
    busy = 1;
    @(negedge clk); hwrite = 1; haddr = REG_CTRL; hwdata = 16'h0003;
    @(negedge clk); hwrite = 0;
    chk(!cmd_start && cmd_line_ready, "START ignored while busy, LINE_READY taken");
    status = 8'h5a; haddr = REG_CTRL; #1;
    chk(hrdata == 16'h005a, "status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
