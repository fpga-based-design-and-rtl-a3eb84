// sine_lut: one sinusoidal reference voltage read from a look-up table.
//
// The table holds LUT_N samples of one period of
//     v(i) = AMP * sin(2*pi*i/LUT_N + PHASE_DEG*pi/180),   i = 0 .. LUT_N-1,
// as fractions of the DC-link voltage (see svm_pkg). The table contents are
// worked out by the elaborator from $sin, so no data file is needed and the
// result is a constant ROM. An address counter advances one entry on every
// `step` pulse and wraps after LUT_N entries; the output register `v_ref`
// is loaded from the new address in the cycle after the step (one cycle of
// latency). Three instances with PHASE_DEG = 0, -120 and -240, stepped by
// the same divider tick, give the balanced three-phase references of the
// modulator. AMP_Q14 = 8192 is 0.5 * vdc, the 30 V amplitude on a 60 V bus
// used in the original tests. Using tables for the references follows the
// original design; the table size and number format are this design's
// choice. Reset returns the address to entry 0 and clears the output.
module sine_lut
  import svm_pkg::*;
#(
  parameter int LUT_N     = 1000,
  parameter int PHASE_DEG = 0,
  parameter int AMP_Q14   = 8192
) (
  input  logic clk,
  input  logic rst,
  input  logic step,
  output fix_t v_ref
);

  localparam real PI = 3.14159265358979323846;
  localparam int AW = (LUT_N > 1) ? $clog2(LUT_N) : 1;

  fix_t rom [LUT_N];

  for (genvar i = 0; i < LUT_N; i++) begin : g_rom
    localparam real ANGLE = 2.0 * PI * real'(i) / real'(LUT_N)
                          + real'(PHASE_DEG) * PI / 180.0;
    localparam int SAMPLE = int'($floor(real'(AMP_Q14) * $sin(ANGLE) + 0.5));
    assign rom[i] = fix_t'(SAMPLE);
  end

  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr  <= '0;
      v_ref <= '0;
    end else begin
      if (step) addr <= (addr == AW'(LUT_N - 1)) ? '0 : addr + 1'b1;
      v_ref <= rom[addr];
    end
  end

endmodule
