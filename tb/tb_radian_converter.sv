// tb_radian_converter: drives random phases and checks, one clock later,
// the octant and theta against the angle folded into [0, pi/4] computed in
// real arithmetic (tolerance: half an LSB plus the 2.2e-6 rad error of the
// shift-and-add pi/4 constant). Also checks the one-clock valid delay.
module tb_radian_converter;
  localparam int unsigned PHASE_W = 16, THETA_W = 18;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  logic [PHASE_W-1:0] phase = '0;
  logic [2:0] octant;
  logic [THETA_W-1:0] theta;
  int checks = 0, failures = 0;
  int odd_seen = 0;

  radian_converter dut (.clk, .rst_n, .valid_in, .phase, .valid_out, .octant, .theta);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real turn, pos, a, e;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      phase    = PHASE_W'($urandom);
      valid_in = ($urandom % 4) != 0;
      @(negedge clk);
      checks++;
      if (valid_out != valid_in) failures++;
      // result for the phase applied in this cycle
      turn = (real'(phase) + 0.5) / real'(1 << PHASE_W) * 8.0;
      pos  = turn - $floor(turn);
      if ((int'($floor(turn)) % 2) == 1) begin pos = 1.0 - pos; odd_seen++; end
      a = pos * PI / 4.0;
      e = real'(theta) * 2.0 ** (-real'(THETA_W)) - a;
      if (e < 0) e = -e;
      checks++;
      if (int'(octant) != int'($floor(turn)) || e > 2.0 ** (-real'(THETA_W + 1)) + 2.3e-6) begin
        failures++;
        if (failures < 10) $display("phase=%h octant=%0d theta=%h a=%f", phase, octant, theta, a);
      end
    end
    checks++; if (odd_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
