// tb_clock_divider: checks that the divider ticks for exactly one cycle every
// DIVIDE cycles, starting DIVIDE cycles after reset, at two divide ratios.
module tb_clock_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic tick7, tick2000;

  always #5 clk = ~clk;

  clock_divider #(.DIVIDE(7)) dut7 (.clk(clk), .rst(rst), .tick(tick7));
  clock_divider dut_default (.clk(clk), .rst(rst), .tick(tick2000));

  int cyc = 0, last7 = 0, last2000 = 0, n7 = 0, n2000 = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (tick7) begin
        checks++;
        if (cyc - last7 != 7) begin
          failures++;
          $display("FAIL DIVIDE=7 tick interval %0d", cyc - last7);
        end
        last7 <= cyc;
        n7 <= n7 + 1;
      end
      if (tick2000) begin
        checks++;
        if (cyc - last2000 != 2000) begin
          failures++;
          $display("FAIL DIVIDE=2000 tick interval %0d", cyc - last2000);
        end
        last2000 <= cyc;
        n2000 <= n2000 + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10_050) @(posedge clk);
    checks++;
    if (n7 < 1400 || n2000 != 5) begin
      failures++;
      $display("FAIL tick counts %0d %0d", n7, n2000);
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
