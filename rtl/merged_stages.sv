// merged_stages: the last half-rotation stages merged into one.
//
// For k >= (p-1)/2 the product of any two step tangents is below the LSB of
// a p-bit datapath, so stages K0..THETA_W+1 can be applied at once:
//   x' = x - y * R,  y' = y + x * R,  R = sum_{i=K0..THETA_W+1} r_i 2^-i
// with r_i = 2 b_{i-1} - 1 taken from the low bits of theta. The products are
// built with shifts and adders only: every digit adds or subtracts one
// shifted copy of the operand into an exact sum with 2^-(THETA_W+1)
// resolution, which is rounded to nearest once at the end.
//
// Timing: registered, one clock for all M = THETA_W + 2 - K0 merged stages
// instead of M clocks; octant and valid travel with the data. The merge rule
// follows the method; the single rounding is this design's choice.
module merged_stages #(
  parameter int unsigned IW      = 19,
  parameter int unsigned THETA_W = 18,
  parameter int unsigned K0      = 8
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
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out
);

  localparam int unsigned KL = THETA_W + 1;         // last digit index
  localparam int unsigned SW = IW + KL - K0 + 3;    // exact sum width

  logic signed [SW-1:0] sum_xr, sum_yr;   // x*R and y*R at scale 2^-KL
  logic signed [IW-1:0] rnd_xr, rnd_yr;
  logic signed [IW-1:0] x_n, y_n;

  always_comb begin
    sum_xr = '0;
    sum_yr = '0;
    for (int unsigned i = K0; i <= KL; i++) begin
      if (theta_in[KL - i]) begin  // b_{i-1} = 1: r_i = +1
        sum_xr = sum_xr + (SW'(x_in) <<< (KL - i));
        sum_yr = sum_yr + (SW'(y_in) <<< (KL - i));
      end else begin               // b_{i-1} = 0: r_i = -1
        sum_xr = sum_xr - (SW'(x_in) <<< (KL - i));
        sum_yr = sum_yr - (SW'(y_in) <<< (KL - i));
      end
    end
    rnd_xr = IW'((sum_xr + (SW'(1) <<< (KL - 1))) >>> KL);
    rnd_yr = IW'((sum_yr + (SW'(1) <<< (KL - 1))) >>> KL);
    x_n    = x_in - rnd_yr;
    y_n    = y_in + rnd_xr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out  <= 1'b0;
      octant_out <= '0;
      x_out      <= '0;
      y_out      <= '0;
    end else begin
      valid_out  <= valid_in;
      octant_out <= octant_in;
      x_out      <= x_n;
      y_out      <= y_n;
    end
  end

endmodule
