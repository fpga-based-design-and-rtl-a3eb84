// tb_switching_frequency_select: checks the Choice -> half-period mapping
// (00: 1 kHz, 01: 2 kHz, 10 and 11: 5 kHz) at the default 100 MHz clock and
// at a second clock rate.
module tb_switching_frequency_select;
  import svm_pkg::*;

  int checks = 0, failures = 0;
  logic [1:0] choice;
  cyc_t half_100m, half_1m;

  switching_frequency_select dut (.choice(choice), .half_period(half_100m));
  switching_frequency_select #(.CLK_HZ(1_000_000)) dut_slow (.choice(choice), .half_period(half_1m));

  function automatic int expected(int clk_hz, logic [1:0] c);
    int f;
    f = (c == 2'b00) ? 1000 : (c == 2'b01) ? 2000 : 5000;
    return clk_hz / f / 2;
  endfunction

  initial begin
    for (int c = 0; c < 4; c++) begin
      choice = 2'(c);
      #1;
      checks++;
      if (int'(half_100m) != expected(100_000_000, choice)) begin
        failures++;
        $display("FAIL choice=%b half=%0d expected %0d", choice, half_100m, expected(100_000_000, choice));
      end
      checks++;
      if (int'(half_1m) != expected(1_000_000, choice)) begin
        failures++;
        $display("FAIL (1 MHz) choice=%b half=%0d expected %0d", choice, half_1m, expected(1_000_000, choice));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
