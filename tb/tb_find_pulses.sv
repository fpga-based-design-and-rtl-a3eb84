// tb_find_pulses: loads random turn-on instants and half periods and
// watches whole periods. Per period and gate it checks the on time
// (2*(H - t_on), or 0 when t_on >= H), that the pulse is centred in the
// period, that period_start comes every 2*H cycles, and that instants
// changed in mid-period only take effect at the next period start.
module tb_find_pulses;
  import svm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, period_start;
  cyc_t half_period;
  legs_times_t t_on;
  legs_t gates;

  always #5 clk = ~clk;

  find_pulses dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  // Per-period statistics of the six gates.
  int cyc_in_period, on_cnt[6], first_on[6], last_on[6], n_periods;
  cyc_t half_cur, ton_cur[6], half_next, ton_next[6];
  bit started = 0;

  function automatic logic gate_bit(int k);
    return (k % 2 == 0) ? gates[k / 2].s1 : gates[k / 2].s2;
  endfunction

  // ps_q marks the first cycle of a period as seen on the registered gates.
  logic ps_q = 0;
  cyc_t half_ld, ton_ld[6];
  always @(posedge clk) begin
    ps_q <= period_start && !rst;
    if (period_start) begin
      // what the block took at this period boundary
      half_ld = half_next;
      for (int k = 0; k < 6; k++) ton_ld[k] = ton_next[k];
    end
    if (ps_q) begin
      if (started) begin
        check(cyc_in_period == 2 * int'(half_cur),
              $sformatf("period length %0d expected %0d", cyc_in_period, 2 * half_cur));
        for (int k = 0; k < 6; k++) begin
          automatic int exp_on = (ton_cur[k] >= half_cur) ? 0 : 2 * (int'(half_cur) - int'(ton_cur[k]));
          check(on_cnt[k] == exp_on, $sformatf("gate %0d on for %0d expected %0d (H=%0d ton=%0d)",
                k, on_cnt[k], exp_on, half_cur, ton_cur[k]));
          if (exp_on > 0)
            check(first_on[k] == int'(ton_cur[k]) && last_on[k] == 2 * int'(half_cur) - 1 - int'(ton_cur[k]),
                  $sformatf("gate %0d pulse %0d..%0d not centred", k, first_on[k], last_on[k]));
        end
        n_periods++;
      end
      started = 1;
      half_cur = half_ld;
      for (int k = 0; k < 6; k++) ton_cur[k] = ton_ld[k];
      cyc_in_period = 1;
      for (int k = 0; k < 6; k++) begin
        on_cnt[k] = gate_bit(k);
        first_on[k] = gate_bit(k) ? 0 : -1;
        last_on[k] = gate_bit(k) ? 0 : -1;
      end
    end else begin
      for (int k = 0; k < 6; k++) if (gate_bit(k)) begin
        on_cnt[k]++;
        if (first_on[k] < 0) first_on[k] = cyc_in_period;
        last_on[k] = cyc_in_period;
      end
      cyc_in_period++;
    end
  end

  task automatic set_inputs(int h);
    half_period = cyc_t'(h);
    for (int k = 0; k < 6; k++) begin
      case ($urandom_range(0, 5))
        0: ton_next[k] = '0;
        1: ton_next[k] = cyc_t'(h);
        2: ton_next[k] = cyc_t'(h + 3);
        default: ton_next[k] = cyc_t'($urandom_range(0, h - 1));
      endcase
      if (k % 2 == 0) t_on[k / 2].s1 = ton_next[k]; else t_on[k / 2].s2 = ton_next[k];
    end
    half_next = cyc_t'(h);
  endtask

  initial begin
    half_period = 20;
    t_on = '1;
    half_next = 20;
    for (int k = 0; k < 6; k++) ton_next[k] = '1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      @(posedge period_start);
      @(negedge clk);
      // change inputs in mid-period: they must wait for the next start
      repeat ($urandom_range(1, 10)) @(negedge clk);
      set_inputs($urandom_range(8, 60));
    end
    @(posedge period_start);
    @(negedge clk);
    check(n_periods > 290, $sformatf("periods seen %0d", n_periods));
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
