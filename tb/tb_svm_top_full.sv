// tb_svm_top_full: the modulator at its default parameters (100 MHz clock,
// 50 Hz references of 0.5*vdc, 1000-entry tables, 4 us dead time) running
// the three operating points of the published experiments: one full 50 Hz
// reference period at each switching frequency, 1 kHz (Choice = 00),
// 2 kHz (01) and 5 kHz (11). svm_monitor checks every switching period
// (length, volt-second balance, dead time, safety rules); the testbench
// also requires all six sectors to be crossed at each frequency.
module tb_svm_top_full;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [1:0] choice = 2'b00;
  logic [2:0] s1, s1_bar, s2, s2_bar;

  always #5 clk = ~clk;

  svm_top_level dut (
    .clk(clk), .Reset(rst), .Choice(choice),
    .S1a(s1[0]), .S1a_bar(s1_bar[0]), .S1b(s1[1]), .S1b_bar(s1_bar[1]),
    .S1c(s1[2]), .S1c_bar(s1_bar[2]),
    .S2a(s2[0]), .S2a_bar(s2_bar[0]), .S2b(s2[1]), .S2b_bar(s2_bar[1]),
    .S2c(s2[2]), .S2c_bar(s2_bar[2])
  );

  svm_monitor mon (
    .clk(clk), .rst(rst), .choice(choice), .period_start(dut.period_start),
    .s1(s1), .s1_bar(s1_bar), .s2(s2), .s2_bar(s2_bar)
  );

  task automatic require(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [1:0] codes [3] = '{2'b00, 2'b01, 2'b11};
    int expect_periods [3] = '{20, 40, 100};
    int p0, sec0 [1:6];
    repeat (5) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 3; k++) begin
      choice <= codes[k];
      // one 50 Hz period (2,000,000 cycles) plus two switching periods
      p0 = mon.periods;
      for (int s = 1; s <= 6; s++) sec0[s] = mon.seen_sector[s];
      repeat (2_000_000 + 200_000) @(posedge clk);
      require(mon.periods - p0 >= expect_periods[k],
              $sformatf("Choice %b: %0d periods in one reference period", codes[k], mon.periods - p0));
      for (int s = 1; s <= 6; s++)
        require(mon.seen_sector[s] > sec0[s], $sformatf("Choice %b: sector %0d never reached", codes[k], s));
    end
    require(mon.seen_freq[0] > 0 && mon.seen_freq[1] > 0 && mon.seen_freq[2] > 0, "all three switching frequencies");
    require(mon.dead_times > 300, "dead times inserted");
    $display("periods=%0d dead_times=%0d max_vector_error=%f sectors=%p triangles=%p freqs=%p",
             mon.periods, mon.dead_times, mon.max_err, mon.seen_sector, mon.seen_tri, mon.seen_freq);
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures);
    $finish;
  end
endmodule
