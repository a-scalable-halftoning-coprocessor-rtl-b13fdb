// tb_bres_stepper: checks the error-term stepper against the worked example
// of the design (d = 19, s = 11: eps runs -4, 7, -1, 10, 2, -6, 5, -3, 8,
// 0, -8, 3, -5 and the source index 0, 1, 1, 2, 3, 3, 4, 4, 5, 6, 6, 7, 7),
// first with one lane, then with the default two lanes and with four lanes
// against a reference recurrence for random fractions d/s with d >= s.
module tb_bres_stepper;
  import ht_pkg::*;

  int checks = 0, failures = 0;

  logic signed [EPS_W-1:0] e1_in, e1_out, e2_in, e2_out, e4_in, e4_out;
  logic [DIM_W-1:0] s_v, r_v;
  logic first1, first2, first4;
  logic [0:0] a1;
  logic [1:0] a2;
  logic [3:0] a4;

  bres_stepper #(.LANES(1)) u1 (.eps_in(e1_in), .scale_s(s_v), .scale_r(r_v), .first(first1), .adv(a1), .eps_out(e1_out));
  bres_stepper              u2 (.eps_in(e2_in), .scale_s(s_v), .scale_r(r_v), .first(first2), .adv(a2), .eps_out(e2_out));
  bres_stepper #(.LANES(4)) u4 (.eps_in(e4_in), .scale_s(s_v), .scale_r(r_v), .first(first4), .adv(a4), .eps_out(e4_out));

  int fig_eps [13] = '{-4, 7, -1, 10, 2, -6, 5, -3, 8, 0, -8, 3, -5};
  int fig_src [13] = '{0, 1, 1, 2, 3, 3, 4, 4, 5, 6, 6, 7, 7};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int src;
    // worked example, one lane
    s_v = 11; r_v = 8; e1_in = -4; first1 = 1; src = 0;
    for (int n = 0; n < 13; n++) begin
      #1;
      chk(int'(e1_in) == fig_eps[n], $sformatf("eps(%0d)=%0d", n, e1_in));
      src += a1[0];
      chk(src == fig_src[n], $sformatf("src(%0d)=%0d", n, src));
      e1_in = e1_out; first1 = 0;
    end
    // worked example, two lanes
    e2_in = -4; first2 = 1; src = 0;
    for (int n = 0; n < 12; n += 2) begin
      #1;
      chk(src + a2[0] == fig_src[n] && src + a2[0] + a2[1] == fig_src[n+1],
          $sformatf("two-lane src at %0d", n));
      chk(int'(e2_out) == fig_eps[n+2], $sformatf("two-lane eps at %0d", n + 2));
      src += a2[0] + a2[1];
      e2_in = e2_out; first2 = 0;
    end
    // random fractions, two and four lanes against a reference
    repeat (200) begin
      int d, s, r, e, ref_src [64], s2, s4;
      s = $urandom_range(1, 3000); d = s + $urandom_range(0, 5000); r = d - s;
      s_v = DIM_W'(s); r_v = DIM_W'(r);
      e = -(r / 2); ref_src[0] = 0;
      for (int n = 1; n < 64; n++) begin
        e = (e < 0) ? e + s : e - r;
        ref_src[n] = ref_src[n-1] + (e >= 0 ? 1 : 0);
      end
      e2_in = EPS_W'(-(r / 2)); e4_in = EPS_W'(-(r / 2));
      first2 = 1; first4 = 1; s2 = 0; s4 = 0;
      for (int n = 0; n < 64; n += 4) begin
        #1;
        for (int i = 0; i < 4; i++) s4 += a4[i];
        chk(s4 == ref_src[n+3], $sformatf("four-lane d=%0d s=%0d n=%0d", d, s, n));
        e4_in = e4_out; first4 = 0;
      end
      for (int n = 0; n < 64; n += 2) begin
        #1;
        s2 += a2[0];
        chk(s2 == ref_src[n], $sformatf("two-lane d=%0d s=%0d n=%0d", d, s, n));
        s2 += a2[1];
        chk(s2 == ref_src[n+1], $sformatf("two-lane d=%0d s=%0d n=%0d", d, s, n + 1));
        e2_in = e2_out; first2 = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
