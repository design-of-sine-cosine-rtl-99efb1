// rotation_stage: one half-rotation stage of the datapath, index K.
//
// The stage rotates the vector by r_K 2^-K rad, where r_K = 2 b_{K-1} - 1 is
// read straight from bit b_{K-1} of theta (the angle recoding: no sign
// detection as in CORDIC). With tan(2^-K) ~ 2^-K the rotation is
//   x' = x - r_K (y >>> K),  y' = y + r_K (x >>> K)
// two shifts and two add/subtracts. Its gain sqrt(1 + 2^-2K) is a constant
// and is cancelled by the scale factor in the ROM words.
//
// Timing: registered, one clock; theta, octant and valid travel with the
// data. The equations follow the method; rounding the shifted operand to
// nearest is this design's choice. theta bit b_j sits at theta[THETA_W-j].
module rotation_stage #(
  parameter int unsigned IW      = 19,
  parameter int unsigned THETA_W = 18,
  parameter int unsigned K       = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_in,
  input  logic [2:0]           octant_in,
  input  logic [THETA_W-1:0]   theta_in,
  input  logic signed [IW-1:0] x_in,
  input  logic signed [IW-1:0] y_in,
  output logic                 valid_out,
  output logic [2:0]           octant_out,
  output logic [THETA_W-1:0]   theta_out,
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out
);

  localparam int unsigned BIT = THETA_W + 1 - K;  // position of b_{K-1}

  logic                 r_pos;
  logic signed [IW-1:0] xs, ys;
  logic signed [IW-1:0] x_n, y_n;

  always_comb begin
    r_pos = theta_in[BIT];
    xs    = IW'(((IW+1)'(x_in) + ((IW+1)'(1) <<< (K - 1))) >>> K);
    ys    = IW'(((IW+1)'(y_in) + ((IW+1)'(1) <<< (K - 1))) >>> K);
    if (r_pos) begin
      x_n = x_in - ys;
      y_n = y_in + xs;
    end else begin
      x_n = x_in + ys;
      y_n = y_in - xs;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out  <= 1'b0;
      octant_out <= '0;
      theta_out  <= '0;
      x_out      <= '0;
      y_out      <= '0;
    end else begin
      valid_out  <= valid_in;
      octant_out <= octant_in;
      theta_out  <= theta_in;
      x_out      <= x_n;
      y_out      <= y_n;
    end
  end

endmodule
