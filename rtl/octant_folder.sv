// octant_folder: converter of the angle into its image in [0, pi/4] (CI).
//
// The top three bits of the phase give the octant; the remaining
// L = PHASE_W-3 bits are the position f inside it. In odd octants the angle
// runs towards the next multiple of pi/4, so f is mirrored. A half LSB is
// appended to f (value f + 2^-(L+1)), which makes the bitwise complement an
// exact mirror: 1 - (f + 2^-(L+1)) = ~f + 2^-(L+1). The output frac is the
// folded angle as a fraction of pi/4, FRAC_W = PHASE_W-2 fraction bits, never
// 0 and never 1.
//
// Purely combinational. Folding into the first half-quadrant follows the
// method; the octant bit layout and the half-LSB offset are this design's
// choices.
module octant_folder #(
  parameter int unsigned PHASE_W = 16
) (
  input  logic [PHASE_W-1:0] phase,
  output logic [2:0]         octant,
  output logic [PHASE_W-3:0] frac
);

  localparam int unsigned L = PHASE_W - 3;

  logic [L-1:0] f;

  always_comb begin
    octant = phase[PHASE_W-1 -: 3];
    f      = phase[L-1:0];
    if (octant[0]) f = ~f;
    frac = {f, 1'b1};
  end

endmodule
