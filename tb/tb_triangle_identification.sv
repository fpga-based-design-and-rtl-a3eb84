// tb_triangle_identification: random vectors inside the three-level
// hexagon. The expected triangle comes from the vector's coordinates in the
// 60-degree frame of its sector (floating point): triangle 1 if g+h < 1,
// 2 if g >= 1, 4 if h >= 1, else 3. Vectors closer than 0.002 (in
// small-vector lengths) to a boundary are skipped. Every triangle of every
// sector must be visited.
module tb_triangle_identification;
  import svm_pkg::*;
  import svm_tb_pkg::*;

  int checks = 0, failures = 0;
  fix_t v_alpha, v_beta;
  sector_e sector;
  triangle_e triangle;
  int seen [1:6][1:4];

  triangle_identification dut (.*);

  initial begin
    real a, b, g, h;
    int s, exp;
    for (int i = 0; i < 40000; i++) begin
      random_point(0.82, a, b);
      v_alpha = r2q(a);
      v_beta  = r2q(b);
      a = q2r(v_alpha);
      b = q2r(v_beta);
      s = sector_of(a, b);
      to_gh(a, b, s, g, h);
      if (g + h > 2.0 || margin(g, h) < 0.002) continue;
      sector = sector_e'(s);
      #1;
      exp = triangle_of(g, h);
      seen[s][exp]++;
      checks++;
      if (int'(triangle) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sector %0d g=%f h=%f got %0d expected %0d", s, g, h, triangle, exp);
      end
    end
    for (int k = 1; k <= 6; k++)
      for (int t = 1; t <= 4; t++) begin
        checks++;
        if (seen[k][t] < 20) begin failures++; $display("FAIL sector %0d triangle %0d hardly visited", k, t); end
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
