// tb_comparator_array: random and corner gray/threshold pairs through the
// default two-lane and an eight-lane comparator array; a lane must be black
// (1) exactly when its gray level is below its threshold.
module tb_comparator_array;
  import ht_pkg::*;

  int checks = 0, failures = 0;
  gray_t g2 [2], t2 [2], g8 [8], t8 [8];
  logic [1:0] b2;
  logic [7:0] b8;

  comparator_array              u2 (.gray(g2), .thr(t2), .black(b2));
  comparator_array #(.LANES(8)) u8 (.gray(g8), .thr(t8), .black(b8));

  initial begin
    for (int a = 0; a < 256; a += 5)
      for (int b = 0; b < 256; b += 3) begin
        g2[0] = 8'(a); t2[0] = 8'(b); g2[1] = 8'(b); t2[1] = 8'(a);
        #1;
        checks++;
        if (b2[0] != (a < b) || b2[1] != (b < a)) begin
          failures++; $display("FAIL: gray %0d thr %0d", a, b);
        end
      end
    repeat (500) begin
      for (int i = 0; i < 8; i++) begin g8[i] = 8'($urandom); t8[i] = 8'($urandom); end
      if ($urandom_range(0, 3) == 0) t8[3] = g8[3];   // equal: stays white
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (b8[i] != (g8[i] < t8[i])) begin failures++; $display("FAIL: lane %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
