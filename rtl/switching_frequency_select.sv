// switching_frequency_select: sets the switching frequency of the modulator
// from the two-bit Choice input.
//
// Choice = 00 selects 1 kHz, 01 selects 2 kHz and every other code 5 kHz;
// this mapping is the one of the original design. The block returns the
// half switching period in system-clock cycles, CLK_HZ / (2 * fsw), which
// is the peak of the up/down counter that times the pulses. With the
// default 100 MHz clock that is 50000, 25000 or 10000 cycles. The output is
// purely combinational; the pulse generator samples it only at the start of
// a switching period, so a change of Choice takes effect cleanly at a
// period boundary.
module switching_frequency_select
  import svm_pkg::*;
#(
  parameter int CLK_HZ = 100_000_000,
  parameter int FSW_00 = 1_000,
  parameter int FSW_01 = 2_000,
  parameter int FSW_XX = 5_000
) (
  input  logic [1:0] choice,
  output cyc_t       half_period
);

  localparam cyc_t HALF_00 = cyc_t'(CLK_HZ / (2 * FSW_00));
  localparam cyc_t HALF_01 = cyc_t'(CLK_HZ / (2 * FSW_01));
  localparam cyc_t HALF_XX = cyc_t'(CLK_HZ / (2 * FSW_XX));

  always_comb begin
    unique case (choice)
      2'b00:   half_period = HALF_00;
      2'b01:   half_period = HALF_01;
      default: half_period = HALF_XX;
    endcase
  end

endmodule
