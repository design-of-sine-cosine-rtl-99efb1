// radian_converter: converter of the phase into radians (CDR).
//
// Chains the octant folder (CI), which maps the phase onto its image in the
// first half-quadrant, and the multiplier by pi/4 (M), and registers the
// result: theta (THETA_W fraction bits, radians, in (0, pi/4)) and the octant
// that the output stage needs to unfold the result again.
//
// Timing: one clock of latency; valid_in is carried along with the data.
// The CI -> M order follows the synthesizer architecture; the register at the
// output is this design's pipelining choice.
module radian_converter #(
  parameter int unsigned PHASE_W     = 16,
  parameter int unsigned THETA_W     = 18,
  parameter bit          USE_HW_MULT = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_in,
  input  logic [PHASE_W-1:0] phase,
  output logic               valid_out,
  output logic [2:0]         octant,
  output logic [THETA_W-1:0] theta
);

  logic [2:0]         oct_c;
  logic [PHASE_W-3:0] frac_c;
  logic [THETA_W-1:0] theta_c;

  octant_folder #(.PHASE_W(PHASE_W)) u_ci (
    .phase (phase),
    .octant(oct_c),
    .frac  (frac_c)
  );

  pi4_multiplier #(
    .FRAC_W     (PHASE_W - 2),
    .THETA_W    (THETA_W),
    .USE_HW_MULT(USE_HW_MULT)
  ) u_m (
    .frac (frac_c),
    .theta(theta_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      octant    <= '0;
      theta     <= '0;
    end else begin
      valid_out <= valid_in;
      octant    <= oct_c;
      theta     <= theta_c;
    end
  end

endmodule
