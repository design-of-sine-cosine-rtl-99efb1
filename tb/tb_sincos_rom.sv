// tb_sincos_rom: reads every ROM word through the registered port and
// compares it with the start vector worked out here in real arithmetic:
// the angle theta0 plus +-2^-k for each of the address bits, scaled by the
// full scale and by cos(atan(2^-k)) for the two shift-and-add stages that
// follow the ROM at the default sizes. Tolerance: half an LSB.
module tb_sincos_rom;
  localparam int unsigned ROM_BITS = 4, THETA_W = 18, DATA_W = 16, GUARD = 2;
  localparam int unsigned IW = DATA_W + GUARD + 1;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  logic [2:0] octant_in = '0, octant_out;
  logic [THETA_W-1:0] theta_in = '0, theta_out;
  logic signed [IW-1:0] x_out, y_out;
  int checks = 0, failures = 0;

  sincos_rom dut (.clk, .rst_n, .valid_in, .octant_in, .theta_in,
                  .valid_out, .octant_out, .theta_out, .x_out, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, amp, kf, ex, ey;
    amp = 32767.0 * 4.0;
    kf  = $cos($atan(2.0 ** -6.0)) * $cos($atan(2.0 ** -7.0));
    @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++) begin
      for (int addr = 0; addr < 16; addr++) begin
        theta_in  = {4'(addr), 14'($urandom)};
        octant_in = 3'($urandom);
        valid_in  = 1'($urandom);
        @(negedge clk);
        a = 0.5 - 2.0 ** -19.0;
        for (int j = 1; j <= 4; j++)  // bit b_j sets the digit of 2^-(j+1)
          a += ((addr >> (4 - j)) & 1) ? 2.0 ** (-real'(j + 1)) : -(2.0 ** (-real'(j + 1)));
        ex = amp * kf * $cos(a);
        ey = amp * kf * $sin(a);
        checks++;
        if ((real'(x_out) - ex) > 0.5 || (ex - real'(x_out)) > 0.5 ||
            (real'(y_out) - ey) > 0.5 || (ey - real'(y_out)) > 0.5) begin
          failures++;
          if (failures < 10) $display("addr %0d: x %0d y %0d expected %f %f", addr, x_out, y_out, ex, ey);
        end
        checks++;
        if (theta_out != theta_in || octant_out != octant_in || valid_out != valid_in) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
