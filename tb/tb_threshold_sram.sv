// tb_threshold_sram: writes scattered words over the whole 2^20-word default
// threshold SRAM and reads them back (data one clock after re); also checks
// that a clock without re keeps the read data.
module tb_threshold_sram;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic re = 0, we = 0;
  logic [19:0] addr = 0;
  logic [16:0] wdata = 0, rdata;
  logic [19:0] addrs [512];
  logic [16:0] vals [512];

  threshold_sram dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) begin
      addrs[i] = 20'(i * 2039 + (i % 3) * 20'h40000);
      vals[i]  = 17'($urandom);
      @(negedge clk); we = 1; addr = addrs[i]; wdata = vals[i];
    end
    @(negedge clk); we = 0;
    for (int i = 511; i >= 0; i--) begin
      @(negedge clk); re = 1; addr = addrs[i];
      @(posedge clk); #1;
      checks++;
      if (rdata != vals[i]) begin failures++; if (failures < 10) $display("FAIL: word %05x", addrs[i]); end
      @(negedge clk); re = 0; addr = addrs[(i + 7) % 512];
      @(posedge clk); #1;
      checks++;
      if (rdata != vals[i]) begin failures++; if (failures < 10) $display("FAIL: hold %05x", addrs[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
