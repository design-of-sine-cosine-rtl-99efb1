// tb_output_stage: feeds cos/sin of a random folded angle a in (0, pi/4) at
// the internal scale with a random octant o, and checks the outputs against
// A*cos and A*sin of the full angle (o*pi/4 + a for even o,
// (o+1)*pi/4 - a for odd o), A = 32767, within one LSB. Inputs above full
// scale must be clipped to +-32767.
module tb_output_stage;
  localparam int unsigned DATA_W = 16, GUARD = 2, IW = 19;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  logic [2:0] octant_in = '0;
  logic signed [IW-1:0] x_in = '0, y_in = '0;
  logic signed [DATA_W-1:0] cos_out, sin_out;
  int checks = 0, failures = 0;
  int oct_seen [8];

  output_stage dut (.clk, .rst_n, .valid_in, .octant_in, .x_in, .y_in,
                    .valid_out, .cos_out, .sin_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, full, ec, es;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      a         = real'($urandom_range(1, 100000)) / 100001.0 * PI / 4.0;
      octant_in = 3'($urandom);
      valid_in  = 1'($urandom);
      x_in      = IW'(longint'($floor(4.0 * 32767.0 * $cos(a) + 0.5)));
      y_in      = IW'(longint'($floor(4.0 * 32767.0 * $sin(a) + 0.5)));
      @(negedge clk);
      full = (octant_in % 2 == 0) ? real'(octant_in) * PI / 4.0 + a
                                  : real'(octant_in + 1) * PI / 4.0 - a;
      ec = 32767.0 * $cos(full);
      es = 32767.0 * $sin(full);
      oct_seen[octant_in]++;
      checks += 3;
      if ((real'(cos_out) - ec) > 1.0 || (ec - real'(cos_out)) > 1.0) failures++;
      if ((real'(sin_out) - es) > 1.0 || (es - real'(sin_out)) > 1.0) failures++;
      if (valid_out != valid_in) failures++;
    end
    // clipping: slightly above full scale in octant 0 and octant 4
    for (int o = 0; o < 8; o += 4) begin
      x_in = IW'(4 * 32767 + 3);
      y_in = IW'(-4 * 32767 - 3);
      octant_in = 3'(o);
      @(negedge clk);
      checks++;
      if (o == 0 && (cos_out != 16'sd32767 || sin_out != -16'sd32767)) failures++;
      if (o == 4 && (cos_out != -16'sd32767 || sin_out != 16'sd32767)) failures++;
    end
    for (int o = 0; o < 8; o++) begin checks++; if (oct_seen[o] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
