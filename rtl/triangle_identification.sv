// triangle_identification: finds which of the four triangles of its sector
// contains the reference vector.
//
// Each sector of the three-level hexagon is split into four triangles by
// three lines: two of slope +-sqrt(3) through the midpoints of the sector
// sides, v_beta = +-sqrt(3)*v_alpha +- sqrt(1/2)*vdc, and the horizontal
// line v_beta = +-sqrt(1/8)*vdc. For every sector the block tests the
// bounding line of triangle 1 (the inner one), then of triangle 2, then of
// triangle 4; a vector inside none of them lies in triangle 3. The tests
// are the per-sector inequalities of the original design, with one sign
// taken from the sixfold symmetry of the hexagon (sector 6, triangle 2 is
// bounded by v_beta < -sqrt(1/8)*vdc). Voltages are fractions of vdc, so the
// thresholds are the constants K_SQRT1_2 and K_SQRT1_8. Purely
// combinational.
module triangle_identification
  import svm_pkg::*;
(
  input  fix_t      v_alpha,
  input  fix_t      v_beta,
  input  sector_e   sector,
  output triangle_e triangle
);

  fix_t a3;
  logic t1, t2, t4;

  always_comb begin
    a3 = fmul(K_SQRT3, v_alpha);
    unique case (sector)
      SECTOR_1: begin
        t1 = v_beta <  -a3 + K_SQRT1_2;
        t2 = v_beta <   a3 - K_SQRT1_2;
        t4 = v_beta >=  K_SQRT1_8;
      end
      SECTOR_2: begin
        t1 = v_beta <   K_SQRT1_8;
        t2 = v_beta >= -a3 + K_SQRT1_2;
        t4 = v_beta >=  a3 + K_SQRT1_2;
      end
      SECTOR_3: begin
        t1 = v_beta <   a3 + K_SQRT1_2;
        t2 = v_beta >=  K_SQRT1_8;
        t4 = v_beta <  -a3 - K_SQRT1_2;
      end
      SECTOR_4: begin
        t1 = v_beta >= -a3 - K_SQRT1_2;
        t2 = v_beta >=  a3 + K_SQRT1_2;
        t4 = v_beta <  -K_SQRT1_8;
      end
      SECTOR_5: begin
        t1 = v_beta >= -K_SQRT1_8;
        t2 = v_beta <  -a3 - K_SQRT1_2;
        t4 = v_beta <   a3 - K_SQRT1_2;
      end
      default: begin  // SECTOR_6
        t1 = v_beta >=  a3 - K_SQRT1_2;
        t2 = v_beta <  -K_SQRT1_8;
        t4 = v_beta >= -a3 + K_SQRT1_2;
      end
    endcase

    if (t1)      triangle = TRIANGLE_1;
    else if (t2) triangle = TRIANGLE_2;
    else if (t4) triangle = TRIANGLE_4;
    else         triangle = TRIANGLE_3;
  end

endmodule
