// tb_on_off_times: random vectors in every sector and triangle, their
// floating-point dwell times, and the six turn-on instants from the block.
// From the instants the testbench rebuilds the chain of switching states
// over the first half period and checks that
//   - each step changes one phase by exactly one level,
//   - every state lies on a corner of the vector's triangle, and the time
//     spent on each corner is half its dwell time (volt-second balance),
//   - the chain starts in the state printed in the published switching
//     tables (sectors 1, 2 and 4),
//   - a switch that is never on gets the half period as its instant.
module tb_on_off_times;
  import svm_pkg::*;
  import svm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sector_e sector;
  triangle_e triangle;
  cyc_t half_period, half_period_o, t1, t2, t3;
  legs_times_t t_on;
  int seen [1:6][1:4];

  always #5 clk = ~clk;

  on_off_times dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  // First state of the chain, as levels "abc", from the published tables.
  function automatic int first_state(int s, int tr);
    int tab [3][4] = '{'{0, 100, 100, 110},     // sector 1
                       '{0, 110,  10,  10},     // sector 2
                       '{0,  11,  -1,  -1}};    // sector 4 (triangle 2)
    case (s)
      1: return tab[0][tr-1];
      2: return tab[1][tr-1];
      4: return tab[2][tr-1];
      default: return -1;
    endcase
  endfunction

  function automatic int level(int p, int c);
    return ((c >= int'(t_on[p].s1)) ? 1 : 0) + ((c >= int'(t_on[p].s2)) ? 1 : 0);
  endfunction

  initial begin
    real a, b, g, h, f[3], ts, th, spent[3], sa, sb, gs, hs, gc, hc;
    int s, tr, ev[$], nev, lv[3], pv[3], c0, c1, diff, fs, hit;
    int half_choices [3] = '{50000, 25000, 10000};
    sector = SECTOR_1; triangle = TRIANGLE_1; half_period = '0; t1 = '0; t2 = '0; t3 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      random_point(0.8, a, b);
      s = sector_of(a, b);
      to_gh(a, b, s, g, h);
      if (g + h > 1.98 || margin(g, h) < 0.01) continue;
      tr = triangle_of(g, h);
      seen[s][tr]++;
      dwell(tr, g, h, f[0], f[1], f[2]);
      th = half_choices[i % 3];
      ts = 2.0 * th;
      @(negedge clk);
      sector = sector_e'(s); triangle = triangle_e'(tr);
      half_period = cyc_t'(half_choices[i % 3]);
      t1 = cyc_t'(int'(f[0] * ts)); t2 = cyc_t'(int'(f[1] * ts)); t3 = cyc_t'(int'(f[2] * ts));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid && half_period_o == half_period, "out_valid / half period");

      // Event times: 0, every distinct instant below the half period.
      ev = {0};
      for (int p = 0; p < 3; p++) begin
        if (int'(t_on[p].s1) < th) ev.push_back(int'(t_on[p].s1));
        if (int'(t_on[p].s2) < th) ev.push_back(int'(t_on[p].s2));
        check(int'(t_on[p].s1) <= th && int'(t_on[p].s2) <= th && t_on[p].s2 <= t_on[p].s1,
              $sformatf("instants in range and S2 before S1, phase %0d", p));
      end
      ev.sort();
      nev = ev.size();
      ev.push_back(int'(th));
      for (int k = 0; k < 3; k++) spent[k] = 0.0;
      for (int p = 0; p < 3; p++) pv[p] = -1;
      for (int e = 0; e < nev; e++) begin
        c0 = ev[e]; c1 = ev[e + 1];
        if (c1 <= c0) continue;
        for (int p = 0; p < 3; p++) lv[p] = level(p, c0);
        if (c0 == 0) begin
          fs = first_state(s, tr);
          if (fs >= 0 && f[0] * ts > 40.0)
            check(lv[0] * 100 + lv[1] * 10 + lv[2] == fs,
                  $sformatf("sector %0d triangle %0d starts in %0d%0d%0d, expected %03d", s, tr, lv[0], lv[1], lv[2], fs));
        end
        if (pv[0] >= 0) begin
          diff = 0;
          for (int p = 0; p < 3; p++) diff += (lv[p] > pv[p]) ? lv[p] - pv[p] : pv[p] - lv[p];
          check(diff == 1, $sformatf("s%0d T%0d one level per step: %0d%0d%0d -> %0d%0d%0d", s, tr,
                pv[0], pv[1], pv[2], lv[0], lv[1], lv[2]));
        end
        for (int p = 0; p < 3; p++) pv[p] = lv[p];
        state_ab(lv[0], lv[1], lv[2], sa, sb);
        to_gh(sa, sb, s, gs, hs);
        hit = -1;
        for (int k = 0; k < 3; k++) begin
          corner(tr, k, gc, hc);
          if (fabs(gs - gc) < 1e-6 && fabs(hs - hc) < 1e-6) hit = k;
        end
        check(hit >= 0, $sformatf("s%0d T%0d state %0d%0d%0d is not a corner", s, tr, lv[0], lv[1], lv[2]));
        if (hit >= 0) spent[hit] += c1 - c0;
      end
      for (int k = 0; k < 3; k++)
        check(fabs(spent[k] - 0.5 * f[k] * ts) <= 0.002 * ts + 3.0,
              $sformatf("s%0d T%0d corner %0d time %f expected %f", s, tr, k, spent[k], 0.5 * f[k] * ts));
    end
    for (int k = 1; k <= 6; k++)
      for (int t = 1; t <= 4; t++)
        check(seen[k][t] > 10, $sformatf("sector %0d triangle %0d visited", k, t));
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
