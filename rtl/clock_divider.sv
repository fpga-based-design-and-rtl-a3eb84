// clock_divider: turns the board clock into the step rate of the sine
// look-up tables.
//
// A counter runs from 0 to DIVIDE-1 and emits a one-cycle `tick` each time
// it wraps, so `tick` has a frequency of CLK_HZ / DIVIDE. The top sets
// DIVIDE = CLK_HZ / (F_REF * LUT_N) so that a table of LUT_N entries
// stepped once per tick completes one 50 Hz reference period; with the
// default 100 MHz clock and 1000 entries that is one tick every 2000
// cycles. Dividing the board clock to get the 50 Hz reference follows the
// original design; the table size, and hence the divide ratio, is this
// design's choice. Reset is synchronous and active high; the first tick
// comes DIVIDE cycles after reset is released.
module clock_divider #(
  parameter int DIVIDE = 2000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int CW = (DIVIDE > 1) ? $clog2(DIVIDE) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIVIDE - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

  initial assert (DIVIDE >= 1) else $error("DIVIDE must be at least 1");

endmodule
