// svm_monitor: checks the twelve gate outputs of svm_top_level from the
// outside, period by period, against a floating-point model of the
// reference. For every switching period it
//   - checks the period length against the switching frequency that was
//     selected when the period's reference was sampled,
//   - averages the level of each leg from its four gate signals (the mean of
//     a switch and of the inverse of its complement, which cancels the dead
//     time) and checks that the resulting space vector is the reference
//     vector sampled at the start of the period before (volt-second balance),
//   - records the sector and triangle of that reference.
// Throughout it checks that no complementary pair is ever on together,
// that an outer switch is never on without its inner switch, and that each
// turn-off is followed by a dead time of exactly DT_CYCLES before the
// complement turns on. All counters are public for the testbench.
module svm_monitor
  import svm_tb_pkg::*;
#(
  parameter int CLK_HZ    = 100_000_000,
  parameter int F_REF     = 50,
  parameter int LUT_N     = 1000,
  parameter int AMP_Q14   = 8192,
  parameter int DT_CYCLES = 400,
  parameter real TOL      = 0.01
) (
  input logic       clk,
  input logic       rst,
  input logic [1:0] choice,
  input logic       period_start,   // from inside the design: only used to cut periods
  input logic [2:0] s1, s1_bar, s2, s2_bar   // [0] = phase a
);

  localparam int DIVIDE = CLK_HZ / (F_REF * LUT_N);

  int checks = 0, failures = 0;
  int periods = 0, dead_times = 0;
  int seen_sector [1:6];
  int seen_tri [1:4];
  int seen_freq [3];          // 1, 2, 5 kHz periods
  real max_err = 0.0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL [%m] %s", msg);
    end
  endtask

  function automatic int half_of(logic [1:0] c);
    int f;
    f = (c == 2'b00) ? 1000 : (c == 2'b01) ? 2000 : 5000;
    return CLK_HZ / (2 * f);
  endfunction

  // cycles since reset, delayed period marks
  longint cyc = 0;
  logic ps_d1 = 0, ps_d2 = 0;
  // reference sampled at each period start: [0] the newest
  real ref_a [3], ref_b [3];
  int  ref_half [3];
  int  n_samples = 0;
  // per-period sums of the output period currently being seen
  int  len = 0, sum1 [3], sum1b [3], sum2 [3], sum2b [3];
  int  out_periods = 0;
  // dead-time measurement
  logic [2:0] s1_q, s2_q;
  int off_at1 [3], off_at2 [3];

  task automatic close_period();
    real lv [3], a, b, ea, eb, err, g, h;
    int sec;
    for (int p = 0; p < 3; p++)
      lv[p] = (real'(sum1[p]) + len - sum1b[p] + sum2[p] + len - sum2b[p]) / (2.0 * len);
    a = $sqrt(2.0 / 3.0) * 0.5 * (lv[0] - 0.5 * (lv[1] + lv[2]));
    b = (1.0 / $sqrt(2.0)) * 0.5 * (lv[1] - lv[2]);
    // the period that just ended used the sample taken at the start of the
    // period before it; two newer samples have been taken since
    ea = ref_a[2];
    eb = ref_b[2];
    err = $sqrt((a - ea) ** 2 + (b - eb) ** 2);
    if (err > max_err) max_err = err;
    check(err < TOL, $sformatf("period %0d vector (%f,%f) expected (%f,%f)", periods, a, b, ea, eb));
    check(len == 2 * ref_half[2], $sformatf("period %0d length %0d expected %0d", periods, len, 2 * ref_half[2]));
    case (ref_half[2] * 2)
      CLK_HZ / 1000: seen_freq[0]++;
      CLK_HZ / 2000: seen_freq[1]++;
      CLK_HZ / 5000: seen_freq[2]++;
      default: ;
    endcase
    sec = sector_of(ea, eb);
    to_gh(ea, eb, sec, g, h);
    seen_sector[sec]++;
    seen_tri[triangle_of(g, h)]++;
    periods++;
  endtask

  always @(posedge clk) begin
    if (rst) begin
      cyc = 0;
      n_samples = 0;
      out_periods = 0;
      ps_d1 <= 0;
      ps_d2 <= 0;
      for (int p = 0; p < 3; p++) begin off_at1[p] = -1; off_at2[p] = -1; end
    end else begin
      cyc++;
      ps_d1 <= period_start;
      ps_d2 <= ps_d1;
      if (period_start) begin
        // reference at the table entry the divider has reached
        real th, va, vb, vc;
        longint idx;
        idx = ((cyc - 1) / DIVIDE) % LUT_N;
        th = 2.0 * PI * idx / LUT_N;
        va = AMP_Q14 / 16384.0 * $sin(th);
        vb = AMP_Q14 / 16384.0 * $sin(th - 2.0 * PI / 3.0);
        vc = AMP_Q14 / 16384.0 * $sin(th - 4.0 * PI / 3.0);
        for (int k = 2; k > 0; k--) begin
          ref_a[k] = ref_a[k-1];  ref_b[k] = ref_b[k-1];  ref_half[k] = ref_half[k-1];
        end
        ref_a[0] = $sqrt(2.0 / 3.0) * (va - 0.5 * (vb + vc));
        ref_b[0] = (vb - vc) / $sqrt(2.0);
        ref_half[0] = half_of(choice);
        n_samples++;
      end
      // outputs of a period start two cycles after its period_start mark
      if (ps_d2) begin
        if (out_periods >= 3 && len > 0) close_period();
        out_periods++;
        len = 0;
        for (int p = 0; p < 3; p++) begin sum1[p] = 0; sum1b[p] = 0; sum2[p] = 0; sum2b[p] = 0; end
      end
      len++;
      for (int p = 0; p < 3; p++) begin
        sum1[p] += s1[p];  sum1b[p] += s1_bar[p];
        sum2[p] += s2[p];  sum2b[p] += s2_bar[p];
        // safety rules
        check(!(s1[p] && s1_bar[p]) && !(s2[p] && s2_bar[p]), $sformatf("pair on together, leg %0d", p));
        check(!(s1[p] && !s2[p]), $sformatf("S1 on without S2, leg %0d", p));
        // dead time between a turn-off and the complement's turn-on
        if (s1_q[p] && !s1[p]) off_at1[p] = int'(cyc);
        if (s2_q[p] && !s2[p]) off_at2[p] = int'(cyc);
        if (s1_bar[p] && off_at1[p] >= 0) begin
          check(int'(cyc) - off_at1[p] == DT_CYCLES, $sformatf("dead time %0d", int'(cyc) - off_at1[p]));
          dead_times++;
          off_at1[p] = -1;
        end
        if (s2_bar[p] && off_at2[p] >= 0) begin
          check(int'(cyc) - off_at2[p] == DT_CYCLES, $sformatf("dead time %0d", int'(cyc) - off_at2[p]));
          dead_times++;
          off_at2[p] = -1;
        end
      end
    end
    s1_q <= s1;
    s2_q <= s2;
  end

endmodule
