// tb_src_line_buffer: the host port fills all 2048 words while the
// coprocessor port reads already written words in the same clocks; every
// read, on either port, must return the last value written one clock later.
module tb_src_line_buffer;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_re = 0, b_we = 0, b_re = 0;
  logic [10:0] a_addr = 0, b_addr = 0;
  logic [31:0] b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [2048];

  src_line_buffer dut (.*);

  function automatic logic [31:0] pat(int a, int pass);
    return 32'(a * 32'h9e3779b1 + pass * 32'h1234567);
  endfunction

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2048; a++) begin
        int ra;
        @(negedge clk);
        b_we = 1; b_re = 0; b_addr = 11'(a); b_wdata = pat(a, pass);
        ra = (a == 0) ? 0 : $urandom_range(0, a - 1);
        a_re = (a != 0); a_addr = 11'(ra);
        @(posedge clk); #1;
        if (a != 0) begin
          checks++;
          if (a_rdata != model[ra]) begin failures++; if (failures < 10) $display("FAIL: port A word %0d", ra); end
        end
        model[a] = pat(a, pass);
      end
      @(negedge clk); b_we = 0; a_re = 0;
      repeat (300) begin
        int ra;
        ra = $urandom_range(0, 2047);
        @(negedge clk); b_re = 1; b_addr = 11'(ra);
        @(posedge clk); #1;
        checks++;
        if (b_rdata != model[ra]) begin failures++; $display("FAIL: port B word %0d", ra); end
      end
      @(negedge clk); b_re = 0;
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
