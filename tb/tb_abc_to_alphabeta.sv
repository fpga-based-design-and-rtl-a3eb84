// tb_abc_to_alphabeta: drives random and balanced three-phase samples and
// compares v_alpha, v_beta with the Concordia transform computed in
// floating point; checks the one-cycle latency and that outputs hold
// between samples.
module tb_abc_to_alphabeta;
  import svm_pkg::*;
  import svm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  fix_t va, vb, vc, v_alpha, v_beta;
  logic out_valid;

  always #5 clk = ~clk;

  abc_to_alphabeta dut (.*);

  function automatic real urand_pm1();
    int r;
    r = $urandom_range(0, 20000);
    return (r - 10000) / 10000.0;
  endfunction

  task automatic check_close(real got, real exp, string what);
    checks++;
    if (fabs(got - exp) > 0.0005) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real a, b, c, ea, eb, th;
    va = '0; vb = '0; vc = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0) begin
        a = urand_pm1();
        b = urand_pm1();
        c = urand_pm1();
      end else begin
        th = 2.0 * PI * i / 2000.0;
        a = 0.5 * $sin(th);
        b = 0.5 * $sin(th - 2.0 * PI / 3.0);
        c = 0.5 * $sin(th - 4.0 * PI / 3.0);
      end
      @(negedge clk);
      va = r2q(a); vb = r2q(b); vc = r2q(c);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      va = '0; vb = '0; vc = '0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing"); end
      ea = $sqrt(2.0 / 3.0) * (q2r(r2q(a)) - 0.5 * (q2r(r2q(b)) + q2r(r2q(c))));
      eb = (q2r(r2q(b)) - q2r(r2q(c))) / $sqrt(2.0);
      check_close(q2r(v_alpha), ea, "alpha");
      check_close(q2r(v_beta), eb, "beta");
      if (i % 2 == 1) begin
        // balanced set: magnitude sqrt(3/2) * amplitude
        check_close($sqrt(q2r(v_alpha) ** 2 + q2r(v_beta) ** 2), $sqrt(1.5) * 0.5, "magnitude");
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
      check_close(q2r(v_alpha), ea, "alpha hold");
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
