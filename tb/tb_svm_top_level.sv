// tb_svm_top_level: end-to-end test of the modulator through its pins.
// Two instances run side by side:
//   dut    default parameters (0.5*vdc references), Choice switched between
//          5 kHz, 1 kHz and 2 kHz in the middle of reference periods, and a
//          Reset applied while running;
//   dut_lo references of 0.3*vdc at 5 kHz, small enough to reach the inner
//          triangle 1 of each sector.
// svm_monitor checks every switching period of both (length, volt-second
// balance of the averaged leg levels, dead time, safety rules). The
// testbench counts what happened and fails if a mechanism never occurred:
// each of the six sectors, each of the four triangles, each switching
// frequency, a frequency change, a dead-time insertion and a reset.
module tb_svm_top_level;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rst_lo = 1;
  logic [1:0] choice = 2'b11;
  logic [2:0] s1, s1_bar, s2, s2_bar;
  logic [2:0] l1, l1_bar, l2, l2_bar;
  int freq_changes = 0, resets = 0;

  always #5 clk = ~clk;

  svm_top_level dut (
    .clk(clk), .Reset(rst), .Choice(choice),
    .S1a(s1[0]), .S1a_bar(s1_bar[0]), .S1b(s1[1]), .S1b_bar(s1_bar[1]),
    .S1c(s1[2]), .S1c_bar(s1_bar[2]),
    .S2a(s2[0]), .S2a_bar(s2_bar[0]), .S2b(s2[1]), .S2b_bar(s2_bar[1]),
    .S2c(s2[2]), .S2c_bar(s2_bar[2])
  );

  svm_top_level #(.AMP_Q14(4915)) dut_lo (
    .clk(clk), .Reset(rst_lo), .Choice(2'b10),
    .S1a(l1[0]), .S1a_bar(l1_bar[0]), .S1b(l1[1]), .S1b_bar(l1_bar[1]),
    .S1c(l1[2]), .S1c_bar(l1_bar[2]),
    .S2a(l2[0]), .S2a_bar(l2_bar[0]), .S2b(l2[1]), .S2b_bar(l2_bar[1]),
    .S2c(l2[2]), .S2c_bar(l2_bar[2])
  );

  svm_monitor mon (
    .clk(clk), .rst(rst), .choice(choice), .period_start(dut.period_start),
    .s1(s1), .s1_bar(s1_bar), .s2(s2), .s2_bar(s2_bar)
  );

  svm_monitor #(.AMP_Q14(4915)) mon_lo (
    .clk(clk), .rst(rst_lo), .choice(2'b10), .period_start(dut_lo.period_start),
    .s1(l1), .s1_bar(l1_bar), .s2(l2), .s2_bar(l2_bar)
  );

  task automatic require(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic set_choice(logic [1:0] c);
    @(negedge clk);
    choice = c;
    freq_changes++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    rst_lo <= 0;
    repeat (1_234_567) @(posedge clk);
    set_choice(2'b00);
    repeat (1_100_003) @(posedge clk);
    set_choice(2'b01);
    repeat (777_777) @(posedge clk);
    // reset while running, then carry on at 5 kHz
    @(negedge clk);
    rst = 1;
    resets++;
    repeat (7) @(posedge clk);
    @(negedge clk);
    rst = 0;
    choice = 2'b11;
    freq_changes++;
    repeat (2_100_000) @(posedge clk);

    for (int s = 1; s <= 6; s++)
      require(mon.seen_sector[s] > 0 && mon_lo.seen_sector[s] > 0, $sformatf("sector %0d reached", s));
    for (int t = 1; t <= 4; t++)
      require(mon.seen_tri[t] + mon_lo.seen_tri[t] > 0, $sformatf("triangle %0d reached", t));
    for (int f = 0; f < 3; f++)
      require(mon.seen_freq[f] > 0, $sformatf("switching frequency %0d used", f));
    require(freq_changes >= 3, "switching frequency changed while running");
    require(resets >= 1, "reset while running");
    require(mon.dead_times > 100 && mon_lo.dead_times > 100, "dead times inserted");
    $display("events: freq_changes=%0d resets=%0d periods=%0d/%0d dead_times=%0d/%0d",
             freq_changes, resets, mon.periods, mon_lo.periods, mon.dead_times, mon_lo.dead_times);
    $display("sectors=%p/%p triangles=%p/%p freqs=%p max_err=%f/%f",
             mon.seen_sector, mon_lo.seen_sector, mon.seen_tri, mon_lo.seen_tri, mon.seen_freq,
             mon.max_err, mon_lo.max_err);
    checks += mon.checks + mon_lo.checks;
    failures += mon.failures + mon_lo.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures + mon_lo.failures);
    $finish;
  end
endmodule
