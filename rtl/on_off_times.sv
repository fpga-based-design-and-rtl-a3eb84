// on_off_times: turns the dwell times of the three nearest vectors into the
// instants at which each upper switch of the inverter turns on.
//
// The switching period is symmetrical: a first half visits a chain of
// switching states in which each step raises exactly one phase by one
// level, and the second half retraces it backwards. For sector 1 the
// chains of the four triangles, and the time spent in each state in the
// first half period, are (state = levels of phases a, b, c)
//     triangle 1: 000 100 110 111 211 221 222   t1/6 t2/4 t3/4 t1/6 t2/4 t3/4 t1/6
//     triangle 2: 100 200 210 211               t1/4 t2/2 t3/2 t1/4
//     triangle 3: 100 110 210 211 221           t1/4 t2/4 t3/2 t1/4 t2/4
//     triangle 4: 110 210 220 221               t1/4 t2/2 t3/2 t1/4
// which is the symmetrical sequence of the original design: the redundant
// states of a vector share its dwell time, the zero vector of triangle 1
// being split over its three states. The other sectors use the same chains
// turned by (sector-1)*60 degrees; a 60-degree turn maps the state
// (a, b, c) to (2-b, 2-c, 2-a). An odd number of turns makes the chain
// descend instead of ascend, which only reverses the order of the states.
//
// Because the level of a phase changes monotonically along the chain, the
// upper switch S1 of a phase (on at level 2) and S2 (on at levels 1 and 2)
// each switch at most once per half period. Its turn-on instant is the sum
// of the times of the states in which it is off, whatever their order. The
// last state of the chain takes whatever remains of the half period, so the
// times always add up exactly; a switch that is never on gets the value
// half_period, which the pulse generator never reaches.
//
// One pipeline stage: inputs are taken when `in_valid` is high; the six
// turn-on instants and the half period they belong to appear one cycle
// later with `out_valid`. After reset every instant is at its maximum, so
// all switches stay off until the first sample has gone through.
module on_off_times
  import svm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  sector_e     sector,
  input  triangle_e   triangle,
  input  cyc_t        half_period,
  input  cyc_t        t1,
  input  cyc_t        t2,
  input  cyc_t        t3,
  output logic        out_valid,
  output cyc_t        half_period_o,
  output legs_times_t t_on
);

  localparam int NSEG = 7;
  localparam int SUM_W = CYC_W + 3;

  typedef logic [1:0]       level_t;
  typedef level_t     [2:0] state_t;   // [0] = phase a

  function automatic state_t st(level_t a, level_t b, level_t c);
    state_t s;
    s[0] = a;
    s[1] = b;
    s[2] = c;
    return s;
  endfunction

  // Turn a state by r * 60 degrees.
  function automatic state_t rotate(state_t s, int r);
    state_t o;
    unique case (r)
      0: o = s;
      1: begin o[0] = 2'd2 - s[1]; o[1] = 2'd2 - s[2]; o[2] = 2'd2 - s[0]; end
      2: begin o[0] = s[2];        o[1] = s[0];        o[2] = s[1];        end
      3: begin o[0] = 2'd2 - s[0]; o[1] = 2'd2 - s[1]; o[2] = 2'd2 - s[2]; end
      4: begin o[0] = s[1];        o[1] = s[2];        o[2] = s[0];        end
      default: begin o[0] = 2'd2 - s[2]; o[1] = 2'd2 - s[0]; o[2] = 2'd2 - s[1]; end
    endcase
    return o;
  endfunction

  state_t              seg_state [NSEG];
  logic   [SUM_W-1:0]  seg_len   [NSEG];
  logic   [SUM_W-1:0]  t1_sixth, q1, q2, q3, h2, h3, used, rem, sum1, sum2;
  logic   [CYC_W+16:0] t1_prod;
  legs_times_t         t_on_next;
  int                  r;

  always_comb begin
    // t1/6 as t1 * round(2^16/6) / 2^16.
    t1_prod  = (CYC_W+17)'(t1) * (CYC_W+17)'(10923);
    t1_sixth = SUM_W'(t1_prod >> 16);
    q1 = SUM_W'(t1 >> 2);
    q2 = SUM_W'(t2 >> 2);
    q3 = SUM_W'(t3 >> 2);
    h2 = SUM_W'(t2 >> 1);
    h3 = SUM_W'(t3 >> 1);

    for (int i = 0; i < NSEG; i++) begin
      seg_state[i] = st(2, 2, 2);
      seg_len[i]   = '0;
    end

    unique case (triangle)
      TRIANGLE_1: begin
        seg_state[0] = st(0, 0, 0);  seg_len[0] = t1_sixth;
        seg_state[1] = st(1, 0, 0);  seg_len[1] = q2;
        seg_state[2] = st(1, 1, 0);  seg_len[2] = q3;
        seg_state[3] = st(1, 1, 1);  seg_len[3] = t1_sixth;
        seg_state[4] = st(2, 1, 1);  seg_len[4] = q2;
        seg_state[5] = st(2, 2, 1);  seg_len[5] = q3;
        seg_state[6] = st(2, 2, 2);
        used = t1_sixth + q2 + q3 + t1_sixth + q2 + q3;
      end
      TRIANGLE_2: begin
        seg_state[0] = st(1, 0, 0);  seg_len[0] = q1;
        seg_state[1] = st(2, 0, 0);  seg_len[1] = h2;
        seg_state[2] = st(2, 1, 0);  seg_len[2] = h3;
        seg_state[3] = st(2, 1, 1);
        seg_state[4] = st(2, 1, 1);
        seg_state[5] = st(2, 1, 1);
        seg_state[6] = st(2, 1, 1);
        used = q1 + h2 + h3;
      end
      TRIANGLE_3: begin
        seg_state[0] = st(1, 0, 0);  seg_len[0] = q1;
        seg_state[1] = st(1, 1, 0);  seg_len[1] = q2;
        seg_state[2] = st(2, 1, 0);  seg_len[2] = h3;
        seg_state[3] = st(2, 1, 1);  seg_len[3] = q1;
        seg_state[4] = st(2, 2, 1);
        seg_state[5] = st(2, 2, 1);
        seg_state[6] = st(2, 2, 1);
        used = q1 + q2 + h3 + q1;
      end
      default: begin  // TRIANGLE_4
        seg_state[0] = st(1, 1, 0);  seg_len[0] = q1;
        seg_state[1] = st(2, 1, 0);  seg_len[1] = h2;
        seg_state[2] = st(2, 2, 0);  seg_len[2] = h3;
        seg_state[3] = st(2, 2, 1);
        seg_state[4] = st(2, 2, 1);
        seg_state[5] = st(2, 2, 1);
        seg_state[6] = st(2, 2, 1);
        used = q1 + h2 + h3;
      end
    endcase

    // The last state of the chain fills the rest of the half period.
    rem = (used >= SUM_W'(half_period)) ? '0 : SUM_W'(half_period) - used;
    unique case (triangle)
      TRIANGLE_1: seg_len[6] = rem;
      TRIANGLE_3: seg_len[4] = rem;
      default:    seg_len[3] = rem;
    endcase

    r = int'(sector) - 1;
    for (int p = 0; p < 3; p++) begin
      sum1 = '0;
      sum2 = '0;
      for (int i = 0; i < NSEG; i++) begin
        state_t s;
        s = rotate(seg_state[i], r);
        if (s[p] < 2'd2) sum1 = sum1 + seg_len[i];
        if (s[p] < 2'd1) sum2 = sum2 + seg_len[i];
      end
      t_on_next[p].s1 = (sum1 >= SUM_W'(half_period)) ? half_period : cyc_t'(sum1);
      t_on_next[p].s2 = (sum2 >= SUM_W'(half_period)) ? half_period : cyc_t'(sum2);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid     <= 1'b0;
      half_period_o <= '0;
      t_on          <= '1;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        half_period_o <= half_period;
        t_on          <= t_on_next;
      end
    end
  end

endmodule
