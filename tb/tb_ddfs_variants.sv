// tb_ddfs_variants: end-to-end test of three other configurations of the
// synthesizer, run side by side from one frequency word:
//   hw    default sizes, pi/4 multiplier built with a hardware multiplier
//   p12   12-bit phase and output, 3 ROM address bits: one shift-and-add
//         stage (k = 5), merged stages from k = 6, latency 5
//   rom6  default sizes with a 6-bit (64-word) ROM: the ROM reaches the
//         merge point, so there is no separate shift-and-add stage, latency 4
// Each output is compared with A*cos and A*sin of 2*pi*(phase+1/2)/2^q,
// A = 2^(p-1) - 1, for the phase the accumulator held LATENCY clocks
// earlier, within 2 LSB; valid must rise LATENCY + 1 clocks after reset.
module tb_ddfs_variants;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [31:0] fcw = 32'h0123_4567;
  logic v_hw, v_p12, v_rom6;
  logic signed [15:0] c_hw, s_hw, c_rom6, s_rom6;
  logic signed [11:0] c_p12, s_p12;
  int checks = 0, failures = 0;
  real max_err [3];

  ddfs_top #(.USE_HW_MULT(1'b1)) u_hw (.clk, .rst_n, .fcw, .valid(v_hw),
                                       .cos_out(c_hw), .sin_out(s_hw));
  ddfs_top #(.PHASE_W(12), .DATA_W(12), .ROM_BITS(3)) u_p12 (.clk, .rst_n, .fcw,
                                       .valid(v_p12), .cos_out(c_p12), .sin_out(s_p12));
  ddfs_top #(.ROM_BITS(6)) u_rom6 (.clk, .rst_n, .fcw, .valid(v_rom6),
                                   .cos_out(c_rom6), .sin_out(s_rom6));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] hist [int];
  int edge_n = 0;

  task automatic check(int idx, int latency, int pw, int dw, logic v, int c, int s);
    real ph, a, e1, e2;
    checks++;
    if (v != (edge_n >= latency + 1)) failures++;
    if (edge_n >= latency + 1) begin
      a  = real'((64'd1 << (dw - 1)) - 1);
      ph = 2.0 * PI * (real'(hist[edge_n - latency] >> (32 - pw)) + 0.5) / real'(64'd1 << pw);
      e1 = real'(c) - a * $cos(ph); if (e1 < 0) e1 = -e1;
      e2 = real'(s) - a * $sin(ph); if (e2 < 0) e2 = -e2;
      if (e1 > max_err[idx]) max_err[idx] = e1;
      if (e2 > max_err[idx]) max_err[idx] = e2;
      checks++;
      if (e1 > 2.0 || e2 > 2.0) begin
        failures++;
        if (failures < 10) $display("config %0d edge %0d: cos %0d sin %0d", idx, edge_n, c, s);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      if (i % 2000 == 1999) fcw = $urandom;
      @(posedge clk);
      edge_n++;
      hist[edge_n] = (edge_n == 1 ? 32'd0 : hist[edge_n - 1]) + fcw;
      @(negedge clk);
      check(0, 6, 16, 16, v_hw, int'(c_hw), int'(s_hw));
      check(1, 5, 12, 12, v_p12, int'(c_p12), int'(s_p12));
      check(2, 4, 16, 16, v_rom6, int'(c_rom6), int'(s_rom6));
    end
    $display("max error (LSB): hw %f, p12 %f, rom6 %f", max_err[0], max_err[1], max_err[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
