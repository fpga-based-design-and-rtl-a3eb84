// abc_to_alphabeta: power-invariant (Concordia) transformation of the three
// reference voltages into the alpha-beta plane.
//
//     v_alpha = sqrt(2/3) * (va - (vb + vc)/2)
//     v_beta  = (1/sqrt(2)) * (vb - vc)
//
// which is the 2x3 matrix of the original design written out. All values
// are fractions of vdc in the svm_pkg fixed-point format. The block is one
// pipeline stage: inputs are taken when `in_valid` is high and the result
// appears one cycle later with `out_valid`. Outputs hold their value between
// samples. Reset is synchronous and active high.
module abc_to_alphabeta
  import svm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fix_t va,
  input  fix_t vb,
  input  fix_t vc,
  output logic out_valid,
  output fix_t v_alpha,
  output fix_t v_beta
);

  fix_t diff_a, diff_bc;

  always_comb begin
    diff_a  = va - ((vb + vc) >>> 1);
    diff_bc = vb - vc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      v_alpha   <= '0;
      v_beta    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_alpha <= fmul(K_SQRT2_3, diff_a);
        v_beta  <= fmul(K_INV_SQRT2, diff_bc);
      end
    end
  end

endmodule
