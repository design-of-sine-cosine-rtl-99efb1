// output_stage: output stage (OS) that turns sin/cos of the folded angle
// into sin/cos of the full phase.
//
// x_in/y_in are cos/sin of the folded angle a in (0, pi/4) at the internal
// scale (GUARD extra fraction bits). They are rounded to DATA_W bits and
// clipped to +-(2^(DATA_W-1) - 1). With the octant o the full angle is
//   o*pi/4 + a            (o even)
//   (o+1)*pi/4 - a        (o odd, a being the mirrored angle)
// so with C = cos a, S = sin a:
//   o : 0   1   2   3   4   5   6   7
//   cos C   S  -S  -C  -C  -S   S   C
//   sin S   C   C   S  -S  -C  -C  -S
//
// Timing: registered, one clock. Unfolding by octant follows the method; the
// rounding, clipping and octant encoding are this design's choices.
module output_stage #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned GUARD  = 2,
  parameter int unsigned IW     = DATA_W + GUARD + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid_in,
  input  logic [2:0]               octant_in,
  input  logic signed [IW-1:0]     x_in,
  input  logic signed [IW-1:0]     y_in,
  output logic                     valid_out,
  output logic signed [DATA_W-1:0] cos_out,
  output logic signed [DATA_W-1:0] sin_out
);

  localparam logic signed [IW-1:0] MAXV = IW'((longint'(1) << (DATA_W - 1)) - 1);

  function automatic logic signed [DATA_W-1:0] round_clip(logic signed [IW-1:0] v);
    logic signed [IW:0] r;
    r = ((IW+1)'(v) + ((IW+1)'(1) <<< (GUARD - 1))) >>> GUARD;
    if (r > (IW+1)'(MAXV))       return DATA_W'(MAXV);
    else if (r < -(IW+1)'(MAXV)) return DATA_W'(-MAXV);
    else                         return DATA_W'(r);
  endfunction

  logic signed [DATA_W-1:0] c, s, cos_n, sin_n;

  always_comb begin
    c = round_clip(x_in);
    s = round_clip(y_in);
    unique case (octant_in)
      3'd0: begin cos_n =  c; sin_n =  s; end
      3'd1: begin cos_n =  s; sin_n =  c; end
      3'd2: begin cos_n = -s; sin_n =  c; end
      3'd3: begin cos_n = -c; sin_n =  s; end
      3'd4: begin cos_n = -c; sin_n = -s; end
      3'd5: begin cos_n = -s; sin_n = -c; end
      3'd6: begin cos_n =  s; sin_n = -c; end
      default: begin cos_n =  c; sin_n = -s; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      cos_out   <= '0;
      sin_out   <= '0;
    end else begin
      valid_out <= valid_in;
      cos_out   <= cos_n;
      sin_out   <= sin_n;
    end
  end

endmodule
