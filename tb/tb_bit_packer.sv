// tb_bit_packer: feeds random two-bit groups with random gaps into the
// default packer while the consumer refuses bytes at random, and flushes at
// the end of each "scanline" of random length. The bytes that come out are
// compared with a queue of expected bytes built independently (MSB first,
// zero padding at line ends). Also checks that in_ready falls while the
// output register is blocked and a byte is complete.
module tb_bit_packer;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, flush = 0, out_ready = 0;
  logic [1:0] in_bits = 0;
  logic in_ready, sr_empty, idle, out_valid;
  logic [7:0] out_byte;
  int blocked = 0;

  bit_packer dut (.*);

  byte unsigned expq [$];

  // consumer
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: unexpected byte"); end
      else begin
        byte unsigned e;
        e = expq.pop_front();
        if (out_byte != e) begin
          failures++; if (failures < 10) $display("FAIL: got %02x expected %02x", out_byte, e);
        end
      end
    end
    if (in_valid && !in_ready) blocked++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int line = 0; line < 60; line++) begin
      int groups;
      int nb;
      logic [7:0] cur;
      groups = $urandom_range(1, 40);
      nb = 0; cur = 0;
      for (int g = 0; g < groups; g++) begin
        logic [1:0] bits;
        bits = 2'($urandom);
        // lane 0 is the leftmost pixel
        cur = {cur[6:0], bits[0]}; nb++;
        cur = {cur[6:0], bits[1]}; nb++;
        if (nb == 8) begin expq.push_back(cur); nb = 0; cur = 0; end
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; out_ready = 1'($urandom); @(negedge clk); end
        in_valid = 1; in_bits = bits; out_ready = ($urandom_range(0, 2) != 0) && (line % 7 != 3);
        #1;
        while (!in_ready) begin @(negedge clk); out_ready = 1'($urandom); #1; end
      end
      if (nb != 0) expq.push_back(cur << (8 - nb));
      @(negedge clk); in_valid = 0; flush = 1; out_ready = 1'($urandom);
      while (!sr_empty) begin @(negedge clk); out_ready = 1'($urandom); end
      flush = 0;
    end
    while (!idle) begin @(negedge clk); out_ready = 1; end
    repeat (3) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL: %0d bytes missing", expq.size()); end
    checks++; if (blocked == 0) begin failures++; $display("FAIL: back-pressure never seen"); end
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
