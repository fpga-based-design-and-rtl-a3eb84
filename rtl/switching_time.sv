// switching_time: dwell times t1, t2, t3 of the three switching vectors at
// the corners of the triangle that holds the reference vector.
//
// The volt-second balance v1*t1 + v2*t2 + v3*t3 = v_ref*Ts, t1+t2+t3 = Ts is
// solved in two steps. First the reference is expressed in the 60-degree
// oblique frame of its own sector, measured in lengths of a small vector
// (sqrt(1/6)*vdc):
//     g = (c_ga*sqrt(6)*v_alpha + c_gb*sqrt(2)*v_beta) / vdc
//     h = (c_ha*sqrt(6)*v_alpha + c_hb*sqrt(2)*v_beta) / vdc
// where the small integer coefficients per sector are those of the
// per-sector matrices of the original design; for sector 1, g = (sqrt(6)*
// v_alpha - sqrt(2)*v_beta)/vdc and h = 2*sqrt(2)*v_beta/vdc. Second, the
// triangle fixes the three dwell fractions as affine functions of g and h:
//     triangle 1: t1 = 1-g-h, t2 = g,   t3 = h       (zero, small, small)
//     triangle 2: t1 = 2-g-h, t2 = g-1, t3 = h       (small, large, medium)
//     triangle 3: t1 = 1-h,   t2 = 1-g, t3 = g+h-1   (small, small, medium)
//     triangle 4: t1 = 2-g-h, t2 = g,   t3 = h-1     (small, medium, large)
// (in units of Ts). The constant terms for triangles 2..4 are this design's
// derivation: they come from the corners of those triangles not being the
// origin. t1 always belongs to the corner whose redundant states open and
// close the switching sequence. Fractions are clamped to 0..1, so a
// reference outside the hexagon is not compensated. The fractions are
// scaled by Ts = 2*half_period clock cycles.
//
// One pipeline stage: the inputs are taken when `in_valid` is high; times,
// sector, triangle and half period appear together one cycle later with
// `out_valid` and hold until the next sample.
module switching_time
  import svm_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  fix_t      v_alpha,
  input  fix_t      v_beta,
  input  sector_e   sector,
  input  triangle_e triangle,
  input  cyc_t      half_period,
  output logic      out_valid,
  output sector_e   sector_o,
  output triangle_e triangle_o,
  output cyc_t      half_period_o,
  output cyc_t      t1,
  output cyc_t      t2,
  output cyc_t      t3
);

  fix_t p, q, g, h;
  fix_t f1, f2, f3;

  function automatic fix_t clamp01(fix_t x);
    if (x < 0)   return '0;
    if (x > ONE) return ONE;
    return x;
  endfunction

  // Fraction of the full period, in clock cycles.
  function automatic cyc_t scale(fix_t f, cyc_t half);
    logic [CYC_W+FRAC+1:0] prod;
    prod = (CYC_W+FRAC+2)'(unsigned'(f[FRAC:0])) * (CYC_W+FRAC+2)'({half, 1'b0});
    return cyc_t'(prod >> FRAC);
  endfunction

  always_comb begin
    p = fmul(K_SQRT6, v_alpha);
    q = fmul(K_SQRT2, v_beta);
    unique case (sector)
      SECTOR_1: begin g =  p - q;  h =  q + q;  end
      SECTOR_2: begin g =  p + q;  h = -p + q;  end
      SECTOR_3: begin g =  q + q;  h = -p - q;  end
      SECTOR_4: begin g = -p + q;  h = -q - q;  end
      SECTOR_5: begin g = -p - q;  h =  p - q;  end
      default:  begin g = -q - q;  h =  p + q;  end  // SECTOR_6
    endcase

    unique case (triangle)
      TRIANGLE_1: begin f1 = ONE - g - h;     f2 = g;       f3 = h;           end
      TRIANGLE_2: begin f1 = 2*ONE - g - h;   f2 = g - ONE; f3 = h;           end
      TRIANGLE_3: begin f1 = ONE - h;         f2 = ONE - g; f3 = g + h - ONE; end
      default:    begin f1 = 2*ONE - g - h;   f2 = g;       f3 = h - ONE;     end
    endcase
    f1 = clamp01(f1);
    f2 = clamp01(f2);
    f3 = clamp01(f3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid     <= 1'b0;
      sector_o      <= SECTOR_1;
      triangle_o    <= TRIANGLE_1;
      half_period_o <= '0;
      t1            <= '0;
      t2            <= '0;
      t3            <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector_o      <= sector;
        triangle_o    <= triangle;
        half_period_o <= half_period;
        t1            <= scale(f1, half_period);
        t2            <= scale(f2, half_period);
        t3            <= scale(f3, half_period);
      end
    end
  end

endmodule
