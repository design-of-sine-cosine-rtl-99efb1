// tb_rotation_stage: drives random vectors and angle bits into stages 6 and
// 7 and checks x - r*y*2^-k and y + r*x*2^-k (r = +1 when the angle bit
// b_(k-1) is set, else -1) computed in real arithmetic, within half an LSB
// for the rounded shift. Both rotation directions must occur.
module tb_rotation_stage;
  localparam int unsigned IW = 19, THETA_W = 18;
  logic clk = 0, rst_n = 0, valid_in = 0;
  logic [2:0] octant_in = '0;
  logic [THETA_W-1:0] theta_in = '0;
  logic signed [IW-1:0] x_in = '0, y_in = '0;
  logic valid6, valid7;
  logic [2:0] oct6, oct7;
  logic [THETA_W-1:0] th6, th7;
  logic signed [IW-1:0] x6, y6, x7, y7;
  int checks = 0, failures = 0, npos = 0, nneg = 0;

  rotation_stage dut6 (.clk, .rst_n, .valid_in, .octant_in, .theta_in, .x_in, .y_in,
                       .valid_out(valid6), .octant_out(oct6), .theta_out(th6),
                       .x_out(x6), .y_out(y6));
  rotation_stage #(.K(7)) dut7 (.clk, .rst_n, .valid_in, .octant_in, .theta_in, .x_in, .y_in,
                       .valid_out(valid7), .octant_out(oct7), .theta_out(th7),
                       .x_out(x7), .y_out(y7));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real got, real exp);
    return (got - exp) <= 0.5 + 1e-9 && (exp - got) <= 0.5 + 1e-9;
  endfunction

  initial begin
    real r6, r7;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      x_in      = IW'($signed($urandom_range(0, 262000)) - 131000);
      y_in      = IW'($signed($urandom_range(0, 262000)) - 131000);
      theta_in  = THETA_W'($urandom);
      octant_in = 3'($urandom);
      valid_in  = 1'($urandom);
      @(negedge clk);
      r6 = theta_in[THETA_W - 5] ? 1.0 : -1.0;  // b_5
      r7 = theta_in[THETA_W - 6] ? 1.0 : -1.0;  // b_6
      if (r6 > 0) npos++; else nneg++;
      checks += 4;
      if (!near(real'(x6), real'(x_in) - r6 * real'(y_in) / 64.0)) failures++;
      if (!near(real'(y6), real'(y_in) + r6 * real'(x_in) / 64.0)) failures++;
      if (!near(real'(x7), real'(x_in) - r7 * real'(y_in) / 128.0)) failures++;
      if (!near(real'(y7), real'(y_in) + r7 * real'(x_in) / 128.0)) failures++;
      checks++;
      if (th6 != theta_in || oct6 != octant_in || valid6 != valid_in ||
          th7 != theta_in || oct7 != octant_in || valid7 != valid_in) failures++;
    end
    checks++; if (npos == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
