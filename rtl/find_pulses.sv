// find_pulses: creates the six upper gate signals S1a, S2a, S1b, S2b, S1c,
// S2c from their turn-on instants.
//
// An up/down counter serves as a triangular carrier: it counts 0, 1, ...,
// H-1 and then H-1, ..., 1, 0, so one switching period is 2*H clock cycles,
// H being the half period. A gate is on while the counter is at or above
// its turn-on instant, which places each pulse symmetrically about the
// middle of the period, as the symmetrical switching sequence requires. A
// turn-on instant of H or more keeps the gate off for the whole period; an
// instant of 0 keeps it on.
//
// New turn-on instants and a new half period are taken only at the period
// boundary, between the last count of the down slope and the first count
// of the up slope; that cycle is flagged by `period_start`, which the
// modulator uses to sample its references. A half period below 2 (only
// seen before the first sample has gone through the pipeline) is raised to
// 2. The gate outputs are registered: they follow the counter with one
// cycle of delay. Reset (synchronous, active high) turns all gates off.
// The carrier is this design's choice; comparing a counter with on-off
// times follows the original design.
module find_pulses
  import svm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  cyc_t        half_period,
  input  legs_times_t t_on,
  output logic        period_start,
  output legs_t       gates
);

  localparam cyc_t MIN_HALF = cyc_t'(2);

  cyc_t        count;
  logic        down;
  cyc_t        half_l;
  legs_times_t t_on_l;
  logic        wrap;

  assign wrap = down && (count == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      count        <= '0;
      down         <= 1'b1;
      half_l       <= MIN_HALF;
      t_on_l       <= '1;
      period_start <= 1'b0;
      gates        <= '0;
    end else begin
      period_start <= wrap;
      if (wrap) begin
        down   <= 1'b0;
        half_l <= (half_period < MIN_HALF) ? MIN_HALF : half_period;
        t_on_l <= t_on;
      end else if (!down) begin
        if (count == half_l - 1'b1) down <= 1'b1;
        else                        count <= count + 1'b1;
      end else begin
        count <= count - 1'b1;
      end

      for (int p = 0; p < 3; p++) begin
        gates[p].s1 <= (count >= t_on_l[p].s1);
        gates[p].s2 <= (count >= t_on_l[p].s2);
      end
    end
  end

endmodule
