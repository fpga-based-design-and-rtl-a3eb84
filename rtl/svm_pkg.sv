// svm_pkg: types and constants shared by the three-level space vector
// modulator.
//
// Number format: every voltage is carried as a fraction of the DC-link
// voltage vdc, in two's complement with FRAC = 14 fraction bits inside an
// 18-bit word (range -8 .. +8). The space-vector constants of the
// modulator (sqrt(3), sqrt(2/3), 1/sqrt(2), sqrt(6), sqrt(2) and the
// triangle thresholds sqrt(1/2)*vdc and sqrt(1/8)*vdc) are stored in the
// same format. Times are counts of the system clock.
//
// Sector numbering follows the usual 60-degree division of the alpha-beta
// plane: sector 1 spans 0..60 degrees and the numbers increase
// counter-clockwise. Triangles 1..4 of a sector are numbered as in the
// first sector: 1 is the inner triangle touching the origin, 2 the outer
// one on the sector's first (clockwise) side, 4 the outer one on its
// second side and 3 the middle one.
package svm_pkg;

  localparam int FRAC = 14;
  localparam int FIX_W = 18;
  typedef logic signed [FIX_W-1:0] fix_t;

  localparam fix_t ONE = fix_t'(1 << FRAC);

  // Irrational constants, rounded to FRAC fraction bits.
  localparam fix_t K_SQRT3     = fix_t'(28378);  // sqrt(3)     = 1.7320508
  localparam fix_t K_SQRT2_3   = fix_t'(13377);  // sqrt(2/3)   = 0.8164966
  localparam fix_t K_INV_SQRT2 = fix_t'(11585);  // 1/sqrt(2)   = 0.7071068
  localparam fix_t K_SQRT6     = fix_t'(40132);  // sqrt(6)     = 2.4494897
  localparam fix_t K_SQRT2     = fix_t'(23170);  // sqrt(2)     = 1.4142136
  localparam fix_t K_SQRT1_2   = fix_t'(11585);  // sqrt(1/2)   = 0.7071068
  localparam fix_t K_SQRT1_8   = fix_t'(5793);   // sqrt(1/8)   = 0.3535534

  // Clock counts. 17 bits hold one full 1 kHz switching period at 100 MHz.
  localparam int CYC_W = 17;
  typedef logic [CYC_W-1:0] cyc_t;

  typedef enum logic [2:0] {
    SECTOR_1 = 3'd1, SECTOR_2 = 3'd2, SECTOR_3 = 3'd3,
    SECTOR_4 = 3'd4, SECTOR_5 = 3'd5, SECTOR_6 = 3'd6
  } sector_e;

  typedef enum logic [2:0] {
    TRIANGLE_1 = 3'd1, TRIANGLE_2 = 3'd2, TRIANGLE_3 = 3'd3, TRIANGLE_4 = 3'd4
  } triangle_e;

  // The two upper switches of one NPC leg. Level 2 (+vdc/2): s1 = s2 = 1;
  // level 1 (0 V): s1 = 0, s2 = 1; level 0 (-vdc/2): s1 = s2 = 0.
  typedef struct packed {
    logic s1;
    logic s2;
  } leg_t;

  // Turn-on instants of the two upper switches of a leg, counted from the
  // start (and, mirrored, from the end) of the switching period.
  typedef struct packed {
    cyc_t s1;
    cyc_t s2;
  } leg_times_t;

  // Index 0 is phase a, 1 phase b, 2 phase c.
  typedef leg_t       [2:0] legs_t;
  typedef leg_times_t [2:0] legs_times_t;

  // Fixed-point product a*b, rescaled to FRAC fraction bits.
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*FIX_W-1:0] p;
    p = a * b;
    return fix_t'(p >>> FRAC);
  endfunction

endpackage
