// tb_scaling: the comparator-count study of the design (2, 4 and 8
// comparators) on one page, run at two scale factors.
//
// With every source pixel enlarged to 4 x 4 output pixels (d/s = 4/1), each
// architecture must produce the right bitmap and compare one group of LANES
// pixels per clock: the clocks spent comparing may exceed groups + vectors
// only by the line start-up (at most four clocks per line). The best-case
// clocks per output pixel are then 1/2, 1/4 and 1/8. At the same size
// (d/s = 1/1) two and four comparators still keep that rate, while eight
// comparators need two 32-bit source words per clock and can only get one:
// their comparing time must be at least 1.5 times the group count, the
// input-rate limit the design is expected to show.
module tb_scaling;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go = 0;
  int dw = 192, dh = 16, d = 4, s = 1;
  logic fin [3];
  int rc [3], gr [3], vc [3], bad [3], nb [3];

  scaling_harness #(.LANES(2)) h2 (.clk, .rst_n, .go, .dw, .dh, .d, .s, .finished(fin[0]),
    .run_clocks(rc[0]), .groups(gr[0]), .vectors(vc[0]), .bad_bytes(bad[0]), .bytes(nb[0]));
  scaling_harness #(.LANES(4)) h4 (.clk, .rst_n, .go, .dw, .dh, .d, .s, .finished(fin[1]),
    .run_clocks(rc[1]), .groups(gr[1]), .vectors(vc[1]), .bad_bytes(bad[1]), .bytes(nb[1]));
  scaling_harness #(.LANES(8)) h8 (.clk, .rst_n, .go, .dw, .dh, .d, .s, .finished(fin[2]),
    .run_clocks(rc[2]), .groups(gr[2]), .vectors(vc[2]), .bad_bytes(bad[2]), .bytes(nb[2]));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int lanes [3] = '{2, 4, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      d = (run == 0) ? 4 : 1; s = 1;
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      repeat (3) @(negedge clk);
      wait (fin[0] && fin[1] && fin[2]);
      for (int i = 0; i < 3; i++) begin
        $display("d/s=%0d/%0d comparators=%0d: %0d clocks comparing, %0d groups, %0d vectors, %0.3f clocks per pixel",
                 d, s, lanes[i], rc[i], gr[i], vc[i], real'(rc[i]) / real'(dw * dh));
        chk(bad[i] == 0 && nb[i] == dh * dw / 8, $sformatf("bitmap, %0d comparators, d=%0d", lanes[i], d));
        chk(gr[i] == dw * dh / lanes[i], "group count");
        if (run == 0 || lanes[i] < 8)
          chk(rc[i] <= gr[i] + vc[i] + 4 * dh, $sformatf("one group per clock, %0d comparators, d=%0d", lanes[i], d));
        else
          chk(rc[i] * 2 >= gr[i] * 3, "eight comparators limited by the input rate at d = s");
      end
    end
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
