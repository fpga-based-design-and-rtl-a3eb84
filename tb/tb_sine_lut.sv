// tb_sine_lut: steps three tables (0, -120 and -240 degrees) through more
// than one full period and compares every output with the sine worked out
// here in floating point; also checks the one-cycle read latency, that the
// address holds without a step and wraps after LUT_N entries, and that the
// three phases sum to about zero.
module tb_sine_lut;
  import svm_pkg::*;

  localparam int N = 1000;
  localparam int AMP = 8192;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, step = 0;
  fix_t va, vb, vc;

  always #5 clk = ~clk;

  sine_lut #(.PHASE_DEG(0))    dut_a (.clk(clk), .rst(rst), .step(step), .v_ref(va));
  sine_lut #(.PHASE_DEG(-120)) dut_b (.clk(clk), .rst(rst), .step(step), .v_ref(vb));
  sine_lut #(.PHASE_DEG(-240)) dut_c (.clk(clk), .rst(rst), .step(step), .v_ref(vc));

  function automatic int ideal(int idx, int deg);
    return int'($floor(AMP * $sin(2.0 * PI * idx / N + deg * PI / 180.0) + 0.5));
  endfunction

  task automatic check(fix_t got, int exp, string what, int idx);
    checks++;
    if (int'(got) - exp > 1 || exp - int'(got) > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s idx=%0d got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < N + 37; k++) begin
      // address is k here; output of the previous read is on v_ref
      @(negedge clk);
      check(va, ideal(k % N, 0),    "a", k);
      check(vb, ideal(k % N, -120), "b", k);
      check(vc, ideal(k % N, -240), "c", k);
      checks++;
      if (int'(va) + int'(vb) + int'(vc) > 3 || int'(va) + int'(vb) + int'(vc) < -3) begin
        failures++;
        $display("FAIL phases do not sum to zero at %0d", k);
      end
      // hold for one cycle without a step, then step
      @(posedge clk);
      @(negedge clk);
      check(va, ideal(k % N, 0), "a hold", k);
      step <= 1;
      @(posedge clk);
      step <= 0;
      @(posedge clk);
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
