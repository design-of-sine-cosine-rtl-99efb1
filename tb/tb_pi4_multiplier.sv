// tb_pi4_multiplier: sweeps every folded fraction through both variants of
// the pi/4 multiplier and compares theta with frac * pi/4 computed in real
// arithmetic. The shift-and-add variant may be off by its constant's error
// (2.2e-6 rad at most) plus half an LSB; the multiplier variant by half an
// LSB plus its 20-bit constant's error.
module tb_pi4_multiplier;
  localparam int unsigned FRAC_W = 14, THETA_W = 18;
  localparam real PI = 3.14159265358979323846;
  logic [FRAC_W-1:0] frac;
  logic [THETA_W-1:0] theta_sa, theta_hw;
  int checks = 0, failures = 0;
  real max_sa = 0, max_hw = 0;

  pi4_multiplier dut_sa (.frac, .theta(theta_sa));
  pi4_multiplier #(.USE_HW_MULT(1'b1)) dut_hw (.frac, .theta(theta_hw));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real lsb, ideal, e_sa, e_hw;
    lsb = 2.0 ** (-real'(THETA_W));
    for (int f = 0; f < (1 << FRAC_W); f++) begin
      frac = FRAC_W'(f);
      #1;
      ideal = real'(f) / real'(1 << FRAC_W) * PI / 4.0;
      e_sa = real'(theta_sa) * lsb - ideal; if (e_sa < 0) e_sa = -e_sa;
      e_hw = real'(theta_hw) * lsb - ideal; if (e_hw < 0) e_hw = -e_hw;
      if (e_sa > max_sa) max_sa = e_sa;
      if (e_hw > max_hw) max_hw = e_hw;
      checks += 2;
      if (e_sa > 0.5 * lsb + 2.3e-6) failures++;
      if (e_hw > 0.5 * lsb + 1.0e-6) failures++;
    end
    $display("max error: shift-add %e rad, multiplier %e rad (lsb %e)", max_sa, max_hw, lsb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
