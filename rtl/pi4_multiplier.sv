// pi4_multiplier: multiplier by pi/4 (M), turning the folded octant fraction
// into the rotation angle theta in radians.
//
// frac has FRAC_W fraction bits; theta = frac * pi/4 < 1 rad is returned with
// THETA_W fraction bits, rounded to nearest.
// USE_HW_MULT = 0 (default) uses no multiplier: pi/4 is approximated by
//   2^-1 + 2^-2 + 2^-5 + 2^-8 + 2^-12 = 0.785400390625
// and the product is five shifted copies of frac added together.
// USE_HW_MULT = 1 multiplies by pi/4 rounded to MULT_FRAC bits, which maps
// onto a hardware multiplier block.
//
// Purely combinational. Both variants and the shift-and-add constant follow
// the method; rounding to nearest and MULT_FRAC are this design's choices.
// It requires FRAC_W + 12 > THETA_W and FRAC_W + MULT_FRAC > THETA_W.
module pi4_multiplier #(
  parameter int unsigned FRAC_W      = 14,
  parameter int unsigned THETA_W     = 18,
  parameter bit          USE_HW_MULT = 1'b0,
  parameter int unsigned MULT_FRAC   = 20
) (
  input  logic [FRAC_W-1:0]  frac,
  output logic [THETA_W-1:0] theta
);

  localparam longint PI4_CONST =
    longint'($floor(ddfs_pkg::PI / 4.0 * real'(longint'(1) << MULT_FRAC) + 0.5));

  localparam int unsigned SA_SH = FRAC_W + 12 - THETA_W;     // shift-and-add
  localparam int unsigned HW_SH = FRAC_W + MULT_FRAC - THETA_W;  // multiplier
  localparam int unsigned PW    = FRAC_W + MULT_FRAC + 1;

  logic [PW-1:0] prod_sa, prod_hw;
  logic [THETA_W-1:0] rnd_sa, rnd_hw;

  always_comb begin
    // frac * (2^11 + 2^10 + 2^7 + 2^4 + 2^0), scale 2^-(FRAC_W+12)
    prod_sa = (PW'(frac) << 11) + (PW'(frac) << 10) + (PW'(frac) << 7)
            + (PW'(frac) << 4) + PW'(frac);
    prod_hw = PW'(frac) * PW'(PI4_CONST);
    rnd_sa  = THETA_W'((prod_sa + (PW'(1) << (SA_SH - 1))) >> SA_SH);
    rnd_hw  = THETA_W'((prod_hw + (PW'(1) << (HW_SH - 1))) >> HW_SH);
    theta   = USE_HW_MULT ? rnd_hw : rnd_sa;
  end

endmodule
