// tb_out_fifo: random writes and reads against a queue model on the default
// 1024 x 8 FIFO; checks data order, the empty/full/half-full flags and the
// count, and that writes while full and reads while empty are ignored.
module tb_out_fifo;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full, half_full;
  logic [10:0] count;
  int n_full = 0, n_half = 0;

  out_fifo dut (.*);

  byte unsigned model [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      // phases 0/2 mostly write (fill to full), phases 1/3 mostly read
      repeat (3000) begin
        int pw;
        pw = (phase % 2 == 0) ? 80 : 20;
        @(negedge clk);
        wr_en = ($urandom_range(0, 99) < pw);
        rd_en = ($urandom_range(0, 99) >= pw);
        wdata = 8'($urandom);
        #1;
        chk(count == 11'(model.size()), "count");
        chk(empty == (model.size() == 0), "empty");
        chk(full == (model.size() == 1024), "full");
        chk(half_full == (model.size() >= 512), "half_full");
        if (full) n_full++;
        if (half_full) n_half++;
        if (rd_en && model.size() != 0) begin
          byte unsigned e;
          e = model.pop_front();
          chk(rdata == e, $sformatf("data %02x vs %02x", rdata, e));
        end
        if (wr_en && !full) model.push_back(wdata);
      end
    end
    chk(n_full > 0 && n_half > 0, "flags exercised");
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
