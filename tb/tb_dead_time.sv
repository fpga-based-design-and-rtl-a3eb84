// tb_dead_time: drives random ideal gate waveforms (runs from 1 to 3x the
// dead time) into two instances (dead time 5 and the default 400) and
// compares both outputs with a history model: the switch is on when the
// ideal signal has been high at the last DT_CYCLES+1 clock edges, its
// complement when the ideal signal has been low that long. Also checks that
// the pair is never on together and counts the inserted dead times.
module tb_dead_time;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ideal = 0;
  logic g5, gn5, g400, gn400;

  always #5 clk = ~clk;

  dead_time #(.DT_CYCLES(5)) dut5 (.clk(clk), .rst(rst), .ideal(ideal), .gate(g5), .gate_n(gn5));
  dead_time dut400 (.clk(clk), .rst(rst), .ideal(ideal), .gate(g400), .gate_n(gn400));

  // hist[0] is the value sampled at the latest edge
  logic hist [0:400];
  int cyc = 0, gaps5 = 0;

  function automatic logic all_are(logic v, int n);
    for (int i = 0; i <= n; i++) if (hist[i] != v) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    for (int i = 400; i > 0; i--) hist[i] <= hist[i - 1];
    hist[0] <= rst ? 1'b0 : ideal;
  end

  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      if (cyc > 410) begin
        checks++;
        if (g5 !== all_are(1'b1, 5) || gn5 !== all_are(1'b0, 5)) begin
          failures++;
          if (failures < 10) $display("FAIL DT=5 cycle %0d gate=%b gate_n=%b", cyc, g5, gn5);
        end
        checks++;
        if (g400 !== all_are(1'b1, 400) || gn400 !== all_are(1'b0, 400)) begin
          failures++;
          if (failures < 10) $display("FAIL DT=400 cycle %0d gate=%b gate_n=%b", cyc, g400, gn400);
        end
        if (!g5 && !gn5) gaps5++;
      end
      checks++;
      if ((g5 && gn5) || (g400 && gn400)) begin
        failures++;
        $display("FAIL complementary pair on together");
      end
    end
  end

  initial begin
    for (int i = 0; i <= 400; i++) hist[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (420) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      ideal <= ~ideal;
      if (n % 4 == 0) repeat ($urandom_range(400, 1200)) @(posedge clk);
      else            repeat ($urandom_range(1, 15)) @(posedge clk);
    end
    repeat (500) @(posedge clk);
    checks++;
    if (gaps5 < 100) begin failures++; $display("FAIL too few dead times seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
