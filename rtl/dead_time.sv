// dead_time: drives a gate signal and its complement with a dead time
// between them.
//
// In an NPC leg the outer and inner switch pairs are complementary
// (S3 = not S1, S4 = not S2). Since a power device turns off more slowly
// than it turns on, the switch that is turning on waits DT_CYCLES clock
// cycles after the other has been told to turn off. This block registers
// the ideal gate signal `ideal`; on every change it turns the switch that
// goes off off at once (one cycle after the change) and the switch that
// goes on on DT_CYCLES cycles later. A pulse shorter than the dead time is
// swallowed, both outputs then staying off. The default of 400 cycles is
// 4 us at 100 MHz, the dead time used in the original tests (it mentions
// 1..4 us as the usual range). After reset both outputs are off for the
// dead time, then the complement `gate_n` turns on.
module dead_time #(
  parameter int DT_CYCLES = 400
) (
  input  logic clk,
  input  logic rst,
  input  logic ideal,
  output logic gate,
  output logic gate_n
);

  localparam int CW = $clog2(DT_CYCLES + 1) + 1;

  logic          ideal_q;
  logic [CW-1:0] count;
  logic          settled;

  assign settled = (count == CW'(DT_CYCLES));
  assign gate    =  ideal_q && settled;
  assign gate_n  = !ideal_q && settled;

  always_ff @(posedge clk) begin
    if (rst) begin
      ideal_q <= 1'b0;
      count   <= '0;
    end else begin
      ideal_q <= ideal;
      if (ideal != ideal_q) count <= '0;
      else if (!settled)    count <= count + 1'b1;
    end
  end

  // The two switches of a complementary pair are never on together.
  assert property (@(posedge clk) !(gate && gate_n));

endmodule
