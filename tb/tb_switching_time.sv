// tb_switching_time: random vectors inside the hexagon with their sector
// and triangle (worked out in floating point); the three dwell times must
// match the volt-second solution t_i = f_i * Ts within a small rounding
// tolerance, add up to Ts, and appear one cycle after in_valid together
// with the sector, triangle and half period they belong to. The volt-second
// balance itself is checked too: the corners weighted by the hardware's
// times must rebuild the reference vector.
module tb_switching_time;
  import svm_pkg::*;
  import svm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fix_t v_alpha, v_beta;
  sector_e sector, sector_o;
  triangle_e triangle, triangle_o;
  cyc_t half_period, half_period_o, t1, t2, t3;

  always #5 clk = ~clk;

  switching_time dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    real a, b, g, h, f[3], ts, ga, ha, gc, hc, tol;
    int s, tr;
    int half_choices [3] = '{50000, 25000, 10000};
    v_alpha = '0; v_beta = '0; sector = SECTOR_1; triangle = TRIANGLE_1; half_period = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 6000; i++) begin
      random_point(0.8, a, b);
      a = q2r(r2q(a)); b = q2r(r2q(b));
      s = sector_of(a, b);
      to_gh(a, b, s, g, h);
      if (g + h > 1.98 || margin(g, h) < 0.003) continue;
      tr = triangle_of(g, h);
      dwell(tr, g, h, f[0], f[1], f[2]);
      @(negedge clk);
      v_alpha = r2q(a); v_beta = r2q(b);
      sector = sector_e'(s); triangle = triangle_e'(tr);
      half_period = cyc_t'(half_choices[i % 3]);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      ts = 2.0 * half_choices[i % 3];
      tol = 0.0015 * ts + 2.0;
      check(out_valid, "out_valid");
      check(int'(sector_o) == s && int'(triangle_o) == tr && int'(half_period_o) == half_choices[i % 3],
            $sformatf("sector/triangle/half passed along: %0d %0d %0d", sector_o, triangle_o, half_period_o));
      check(fabs(t1 - f[0] * ts) <= tol, $sformatf("t1 s%0d T%0d got %0d expected %f", s, tr, t1, f[0] * ts));
      check(fabs(t2 - f[1] * ts) <= tol, $sformatf("t2 s%0d T%0d got %0d expected %f", s, tr, t2, f[1] * ts));
      check(fabs(t3 - f[2] * ts) <= tol, $sformatf("t3 s%0d T%0d got %0d expected %f", s, tr, t3, f[2] * ts));
      check(fabs(real'(t1) + t2 + t3 - ts) <= 3.0 * tol, "times add up to Ts");
      // Rebuild the vector from the corners.
      ga = 0.0; ha = 0.0;
      for (int k = 0; k < 3; k++) begin
        corner(tr, k, gc, hc);
        ga += gc * (k == 0 ? t1 : k == 1 ? t2 : t3) / ts;
        ha += hc * (k == 0 ? t1 : k == 1 ? t2 : t3) / ts;
      end
      check(fabs(ga - g) < 0.01 && fabs(ha - h) < 0.01, $sformatf("volt-second balance g %f/%f h %f/%f", ga, g, ha, h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
