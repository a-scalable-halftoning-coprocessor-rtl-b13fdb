// tb_gray_feeder: drives the default two-lane gray pipeline from a memory
// model with one clock of read latency. For several scale fractions and
// both slots it takes every group (at random or on every clock) and
// compares the LANES gray values with the source pixels that the reference
// recurrence maps the destination pixels onto. With groups taken on every
// clock it also checks that, once the first group is valid, a new group is
// valid on every clock (two output pixels per clock for d >= s).
module tb_gray_feeder;
  import ht_pkg::*;

  localparam int L = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic line_start = 0;
  logic [SRC_AW-1:0] slot_base = 0;
  logic signed [EPS_W-1:0] eps0 = 0;
  logic [DIM_W-1:0] scale_s = 1, scale_r = 0;
  logic mem_re;
  logic [SRC_AW-1:0] mem_addr;
  logic [31:0] mem_rdata;
  logic grp_valid, grp_take = 0;
  gray_t gray [L];
  logic [31:0] mem [2048];

  gray_feeder dut (.*);

  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_addr];

  function automatic int pix(int slot, int x);
    return (x * 13 + slot * 101 + (x >> 3) * 7) & 255;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run_line(int d, int s, int slot, int npix, bit always_take);
    int ref_src [];
    int e, n, bubbles;
    bit started;
    ref_src = new[npix];
    e = -((d - s) / 2); ref_src[0] = 0;
    for (int k = 1; k < npix; k++) begin
      e = (e < 0) ? e + s : e - (d - s);
      ref_src[k] = ref_src[k-1] + (e >= 0 ? 1 : 0);
    end
    @(negedge clk);
    scale_s = DIM_W'(s); scale_r = DIM_W'(d - s); eps0 = EPS_W'(-((d - s) / 2));
    slot_base = SRC_AW'(slot * 1024); line_start = 1;
    @(negedge clk); line_start = 0;
    n = 0; bubbles = 0; started = 0;
    while (n < npix) begin
      grp_take = always_take || ($urandom_range(0, 2) == 0);
      #1;
      if (started && !grp_valid) bubbles++;
      if (grp_valid && grp_take) begin
        started = 1;
        for (int i = 0; i < L; i++)
          chk(int'(gray[i]) == pix(slot, ref_src[n + i]),
              $sformatf("d=%0d s=%0d pixel %0d lane %0d: %0d vs %0d", d, s, n + i, i,
                        gray[i], pix(slot, ref_src[n + i])));
        n += L;
      end
      @(negedge clk);
    end
    grp_take = 0;
    if (always_take) chk(bubbles == 0, $sformatf("d=%0d s=%0d: %0d bubbles", d, s, bubbles));
  endtask

  initial begin
    for (int sl = 0; sl < 2; sl++)
      for (int w = 0; w < 1024; w++)
        for (int p = 0; p < 4; p++) mem[sl * 1024 + w][p*8 +: 8] = 8'(pix(sl, w * 4 + p));
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_line(19, 11, 0, 200, 1);
    run_line(19, 11, 1, 200, 0);
    run_line(1, 1, 0, 300, 1);     // same size: every pixel new
    run_line(5, 1, 1, 120, 1);     // one source pixel spread over five
    run_line(7, 3, 0, 400, 0);
    run_line(1000, 999, 1, 1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
