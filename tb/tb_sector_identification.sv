// tb_sector_identification: random vectors all around the plane, and the
// six sector centres; the sector is worked out from the vector's angle
// (atan2) and compared with the block. Vectors within 0.2 degrees of a
// sector boundary, or closer than 0.01*vdc to the origin, are skipped, since either neighbour is acceptable there.
module tb_sector_identification;
  import svm_pkg::*;
  import svm_tb_pkg::*;

  int checks = 0, failures = 0;
  fix_t v_alpha, v_beta;
  sector_e sector;
  int seen [1:6];

  sector_identification dut (.*);

  task automatic try(real a, real b);
    real ang, rem;
    int exp;
    v_alpha = r2q(a);
    v_beta  = r2q(b);
    #1;
    ang = angle_deg(q2r(v_alpha), q2r(v_beta));
    rem = ang - 60.0 * $floor(ang / 60.0);
    if (rem < 0.2 || rem > 59.8) return;
    // near the origin the fixed-point rounding decides; any sector is fine
    if (q2r(v_alpha) ** 2 + q2r(v_beta) ** 2 < 0.0001) return;
    exp = sector_of(q2r(v_alpha), q2r(v_beta));
    checks++;
    seen[exp]++;
    if (int'(sector) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%f b=%f angle=%f got %0d expected %0d", a, b, ang, sector, exp);
    end
  endtask

  initial begin
    real a, b;
    for (int k = 0; k < 6; k++)
      try(0.5 * $cos((30.0 + 60.0 * k) * PI / 180.0), 0.5 * $sin((30.0 + 60.0 * k) * PI / 180.0));
    for (int i = 0; i < 20000; i++) begin
      random_point(0.8, a, b);
      try(a, b);
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] < 100) begin failures++; $display("FAIL sector %0d hardly visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
