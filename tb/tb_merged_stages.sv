// tb_merged_stages: random vectors and angle bits; the expected result is
// x - y*R, y + x*R with R = sum over i = 8..19 of r_i 2^-i, r_i = +1 when
// angle bit b_(i-1) is set and -1 otherwise, computed in real arithmetic.
// One final rounding allows half an LSB.
module tb_merged_stages;
  localparam int unsigned IW = 19, THETA_W = 18, K0 = 8;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  logic [2:0] octant_in = '0, octant_out;
  logic [THETA_W-1:0] theta_in = '0;
  logic signed [IW-1:0] x_in = '0, y_in = '0, x_out, y_out;
  int checks = 0, failures = 0;

  merged_stages dut (.clk, .rst_n, .valid_in, .octant_in, .theta_in, .x_in, .y_in,
                     .valid_out, .octant_out, .x_out, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rr, ex, ey;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      x_in      = IW'($signed($urandom_range(0, 262000)) - 131000);
      y_in      = IW'($signed($urandom_range(0, 262000)) - 131000);
      theta_in  = (n == 0) ? '0 : (n == 1) ? '1 : THETA_W'($urandom);
      octant_in = 3'($urandom);
      valid_in  = 1'($urandom);
      @(negedge clk);
      rr = 0.0;
      for (int i = K0; i <= THETA_W + 1; i++)
        rr += (theta_in[THETA_W + 1 - i] ? 1.0 : -1.0) * 2.0 ** (-real'(i));
      ex = real'(x_in) - real'(y_in) * rr;
      ey = real'(y_in) + real'(x_in) * rr;
      checks += 2;
      if ((real'(x_out) - ex) > 0.5 + 1e-9 || (ex - real'(x_out)) > 0.5 + 1e-9) failures++;
      if ((real'(y_out) - ey) > 0.5 + 1e-9 || (ey - real'(y_out)) > 0.5 + 1e-9) failures++;
      if (failures > 0 && failures < 5) $display("n=%0d x %0d exp %f y %0d exp %f", n, x_out, ex, y_out, ey);
      checks++;
      if (octant_out != octant_in || valid_out != valid_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
