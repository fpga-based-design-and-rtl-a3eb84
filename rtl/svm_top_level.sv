// svm_top_level: space vector modulator for a three-phase three-level
// neutral-point-clamped (NPC) inverter.
//
// Inputs are the clock (100 MHz by default), an active-high synchronous
// Reset and the two-bit Choice of switching frequency (00: 1 kHz,
// 01: 2 kHz, otherwise 5 kHz). Outputs are the twelve gate signals of the
// inverter: for each leg x = a, b, c the outer switch S1x, the inner switch
// S2x and their complements S1x_bar (drives S3x) and S2x_bar (drives S4x).
//
// Data flow, one sample per switching period:
//   clock_divider -> 3 x sine_lut       50 Hz references va*, vb*, vc*
//   abc_to_alphabeta                    v_alpha, v_beta         (1 cycle)
//   sector_identification,
//   triangle_identification,
//   switching_time                      sector, triangle, t1..t3 (1 cycle)
//   on_off_times                        six turn-on instants    (1 cycle)
//   find_pulses                         six ideal upper gates
//   6 x dead_time                       twelve gate outputs
// The references are sampled at the start of each switching period (the
// `period_start` flag of find_pulses); the result is ready three cycles
// later and is applied from the start of the next period, so the pulses
// lag the reference by one switching period. The switching frequency is
// sampled together with the references and travels down the pipeline with
// them, so a change of Choice takes effect on a period boundary with
// consistent times. This block structure follows the original design; the
// pipelining and the number formats are this design's own.
module svm_top_level
  import svm_pkg::*;
#(
  parameter int CLK_HZ       = 100_000_000,
  parameter int F_REF        = 50,
  parameter int LUT_N        = 1000,
  parameter int AMP_Q14      = 8192,
  parameter int DEAD_TIME_NS = 4000
) (
  input  logic       clk,
  input  logic       Reset,
  input  logic [1:0] Choice,
  output logic       S1a,
  output logic       S1a_bar,
  output logic       S1b,
  output logic       S1b_bar,
  output logic       S1c,
  output logic       S1c_bar,
  output logic       S2a,
  output logic       S2a_bar,
  output logic       S2b,
  output logic       S2b_bar,
  output logic       S2c,
  output logic       S2c_bar
);

  localparam int DIVIDE    = CLK_HZ / (F_REF * LUT_N);
  localparam int DT_CYCLES = int'((longint'(CLK_HZ) * DEAD_TIME_NS) / 1_000_000_000);

  // Reference generation.
  logic lut_step;
  fix_t va, vb, vc;

  clock_divider #(.DIVIDE(DIVIDE)) u_clock_divider (
    .clk(clk), .rst(Reset), .tick(lut_step)
  );

  sine_lut #(.LUT_N(LUT_N), .PHASE_DEG(0),    .AMP_Q14(AMP_Q14)) u_lut_a (
    .clk(clk), .rst(Reset), .step(lut_step), .v_ref(va)
  );
  sine_lut #(.LUT_N(LUT_N), .PHASE_DEG(-120), .AMP_Q14(AMP_Q14)) u_lut_b (
    .clk(clk), .rst(Reset), .step(lut_step), .v_ref(vb)
  );
  sine_lut #(.LUT_N(LUT_N), .PHASE_DEG(-240), .AMP_Q14(AMP_Q14)) u_lut_c (
    .clk(clk), .rst(Reset), .step(lut_step), .v_ref(vc)
  );

  // Switching frequency.
  cyc_t half_period;

  switching_frequency_select #(.CLK_HZ(CLK_HZ)) u_freq_select (
    .choice(Choice), .half_period(half_period)
  );

  // Sample at the start of every switching period.
  logic period_start;
  cyc_t half_s1;
  logic ab_valid;
  fix_t v_alpha, v_beta;

  abc_to_alphabeta u_abc_to_alphabeta (
    .clk(clk), .rst(Reset), .in_valid(period_start),
    .va(va), .vb(vb), .vc(vc),
    .out_valid(ab_valid), .v_alpha(v_alpha), .v_beta(v_beta)
  );

  always_ff @(posedge clk) begin
    if (Reset)             half_s1 <= '0;
    else if (period_start) half_s1 <= half_period;
  end

  // Space vector location.
  sector_e   sector;
  triangle_e triangle;

  sector_identification u_sector_identification (
    .v_alpha(v_alpha), .v_beta(v_beta), .sector(sector)
  );

  triangle_identification u_triangle_identification (
    .v_alpha(v_alpha), .v_beta(v_beta), .sector(sector), .triangle(triangle)
  );

  // Dwell times.
  logic      st_valid;
  sector_e   st_sector;
  triangle_e st_triangle;
  cyc_t      st_half, t1, t2, t3;

  switching_time u_switching_time (
    .clk(clk), .rst(Reset), .in_valid(ab_valid),
    .v_alpha(v_alpha), .v_beta(v_beta), .sector(sector), .triangle(triangle),
    .half_period(half_s1),
    .out_valid(st_valid), .sector_o(st_sector), .triangle_o(st_triangle),
    .half_period_o(st_half), .t1(t1), .t2(t2), .t3(t3)
  );

  // Switching instants.
  cyc_t        oo_half;
  legs_times_t t_on;

  on_off_times u_on_off_times (
    .clk(clk), .rst(Reset), .in_valid(st_valid),
    .sector(st_sector), .triangle(st_triangle), .half_period(st_half),
    .t1(t1), .t2(t2), .t3(t3),
    .out_valid(), .half_period_o(oo_half), .t_on(t_on)
  );

  // Pulses.
  legs_t gates;

  find_pulses u_find_pulses (
    .clk(clk), .rst(Reset), .half_period(oo_half), .t_on(t_on),
    .period_start(period_start), .gates(gates)
  );

  // Dead time on the six complementary pairs.
  logic [2:0] s1, s1_n, s2, s2_n;

  for (genvar p = 0; p < 3; p++) begin : g_leg
    dead_time #(.DT_CYCLES(DT_CYCLES)) u_dt_s1 (
      .clk(clk), .rst(Reset), .ideal(gates[p].s1), .gate(s1[p]), .gate_n(s1_n[p])
    );
    dead_time #(.DT_CYCLES(DT_CYCLES)) u_dt_s2 (
      .clk(clk), .rst(Reset), .ideal(gates[p].s2), .gate(s2[p]), .gate_n(s2_n[p])
    );
  end

  assign S1a = s1[0];  assign S1a_bar = s1_n[0];
  assign S1b = s1[1];  assign S1b_bar = s1_n[1];
  assign S1c = s1[2];  assign S1c_bar = s1_n[2];
  assign S2a = s2[0];  assign S2a_bar = s2_n[0];
  assign S2b = s2[1];  assign S2b_bar = s2_n[1];
  assign S2c = s2[2];  assign S2c_bar = s2_n[2];

  // An outer switch is never on without the inner switch of its leg
  // (levels 2, 1, 0 only): checked on the ideal gates.
  for (genvar p = 0; p < 3; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (Reset) gates[p].s1 |-> gates[p].s2);
  end

endmodule
