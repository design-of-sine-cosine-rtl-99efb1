// sincos_rom: the ROM that replaces the first rotation stages.
//
// Shift-and-add rotation needs tan(2^-k) ~ 2^-k, which is only accurate for
// small angles; the large first digits are therefore taken from a table.
// The address is b_1..b_ROM_BITS, the top bits of theta; since
// r_k = 2 b_{k-1} - 1, it fixes the digits r_2..r_{ROM_BITS+1}. Each word is
// the start vector of the remaining half-rotations:
//   x = K A cos(a), y = K A sin(a),
//   a = theta0 + sum_{k=2..ROM_BITS+1} r_k 2^-k,  theta0 = 1/2 - 2^-(THETA_W+1)
// with A the internal full scale and K the inverse gain of the shift-and-add
// stages after the ROM. The 2 x 2^ROM_BITS words are computed at elaboration
// from these formulas (ddfs_pkg::rom_value).
//
// Timing: registered read, one clock; theta, octant and valid are delayed with
// the data. That the ROM holds the start vector with K and theta0 folded in
// follows the method; ROM_BITS = 4 is chosen from tan(2^-k) - 2^-k <= 2^-p
// (k >= 5 is accurate for p = 16).
module sincos_rom #(
  parameter int unsigned ROM_BITS = 4,
  parameter int unsigned THETA_W  = 18,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned GUARD    = 2,
  parameter int unsigned IW       = DATA_W + GUARD + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_in,
  input  logic [2:0]           octant_in,
  input  logic [THETA_W-1:0]   theta_in,
  output logic                 valid_out,
  output logic [2:0]           octant_out,
  output logic [THETA_W-1:0]   theta_out,
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out
);

  localparam int unsigned DEPTH = 1 << ROM_BITS;

  logic signed [IW-1:0] rom_x [DEPTH];
  logic signed [IW-1:0] rom_y [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_word
    localparam logic signed [IW-1:0] XV =
      IW'(ddfs_pkg::rom_value(i, ROM_BITS, THETA_W, DATA_W, GUARD, 1'b0));
    localparam logic signed [IW-1:0] YV =
      IW'(ddfs_pkg::rom_value(i, ROM_BITS, THETA_W, DATA_W, GUARD, 1'b1));
    assign rom_x[i] = XV;
    assign rom_y[i] = YV;
  end

  logic [ROM_BITS-1:0] addr;
  assign addr = theta_in[THETA_W-1 -: ROM_BITS];

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
      x_out      <= rom_x[addr];
      y_out      <= rom_y[addr];
    end
  end

endmodule
