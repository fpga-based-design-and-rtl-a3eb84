// sector_identification: finds which 60-degree sector of the alpha-beta
// plane contains the reference vector.
//
// It follows the decision tree of the original design. The sign of v_beta
// splits the plane into sectors 1..3 (v_beta >= 0) and 4..6. The upper half
// then compares v_beta with +sqrt(3)*v_alpha (below it: sector 1) and with
// -sqrt(3)*v_alpha (below it: sector 3, otherwise 2). The lower half
// compares v_beta >= sqrt(3)*v_alpha (sector 4) and v_beta >= -sqrt(3)*v_alpha
// (sector 6, otherwise 5). A vector exactly on a boundary goes to the
// sector the tree picks; either neighbour gives the same switching vectors.
// Purely combinational, one constant multiplication.
module sector_identification
  import svm_pkg::*;
(
  input  fix_t    v_alpha,
  input  fix_t    v_beta,
  output sector_e sector
);

  fix_t a3;

  always_comb begin
    a3 = fmul(K_SQRT3, v_alpha);
    if (v_beta >= 0) begin
      if (v_beta < a3)       sector = SECTOR_1;
      else if (v_beta < -a3) sector = SECTOR_3;
      else                   sector = SECTOR_2;
    end else begin
      if (v_beta >= a3)       sector = SECTOR_4;
      else if (v_beta >= -a3) sector = SECTOR_6;
      else                    sector = SECTOR_5;
    end
  end

endmodule
