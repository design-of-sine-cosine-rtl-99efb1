// tb_ddfs_top: end-to-end test of the synthesizer at its default sizes.
//
// A software phase accumulator runs beside the design. Each output pair is
// compared with 32767*cos and 32767*sin of 2*pi*(phase+1/2)/2^16 (the
// design works at the centre of each phase step) for the phase
// the accumulator held LATENCY = 6 clocks earlier; the error may not exceed
// TOL LSB. valid must rise exactly 7 clocks after reset. The frequency word
// is switched several times, including mid-run, to a slow, a fast, a
// near-Nyquist and a random value.
// Mechanisms counted (each must occur): all 8 octants (the odd ones use
// the mirrored angle), all 13 reachable ROM words, both directions of every
// shift-and-add stage and of the merged stage's digits, accumulator
// wrap-around, and frequency changes with continuous phase.
module tb_ddfs_top;
  localparam int unsigned LATENCY = 6;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 2.0;
  logic clk = 0, rst_n = 0;
  logic [31:0] fcw = 32'h0100_0000;
  logic valid;
  logic signed [15:0] cos_out, sin_out;
  int checks = 0, failures = 0;
  int oct_seen [8], rom_seen [16];
  int stage_pos = 0, stage_neg = 0, merged_pos = 0, merged_neg = 0;
  int wraps = 0, fcw_changes = 0;
  real max_err = 0.0;

  ddfs_top dut (.clk, .rst_n, .fcw, .valid, .cos_out, .sin_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled inside the datapath
  always @(posedge clk) if (rst_n) begin
    if (dut.cdr_valid) begin
      oct_seen[dut.cdr_oct]++;
      rom_seen[dut.cdr_theta[17:14]]++;
      if (dut.cdr_theta[13]) stage_pos++; else stage_neg++;  // digit of stage 6
      if (dut.cdr_theta[0])  merged_pos++; else merged_neg++; // last merged digit
    end
  end

  longint unsigned acc = 0;
  logic [15:0] hist [int];
  int edge_n = 0;

  task automatic check_edge();
    real ph, ec, es, e1, e2;
    checks++;
    if (valid != (edge_n >= LATENCY + 1)) begin
      failures++;
      $display("edge %0d: valid=%0b", edge_n, valid);
    end
    if (edge_n >= LATENCY + 1) begin
      ph = 2.0 * PI * (real'(hist[edge_n - LATENCY]) + 0.5) / 65536.0;
      ec = 32767.0 * $cos(ph);
      es = 32767.0 * $sin(ph);
      e1 = real'(cos_out) - ec; if (e1 < 0) e1 = -e1;
      e2 = real'(sin_out) - es; if (e2 < 0) e2 = -e2;
      if (e1 > max_err) max_err = e1;
      if (e2 > max_err) max_err = e2;
      checks++;
      if (e1 > TOL || e2 > TOL) begin
        failures++;
        if (failures < 10)
          $display("edge %0d phase %h: cos %0d (%f) sin %0d (%f)", edge_n,
                   hist[edge_n - LATENCY], cos_out, ec, sin_out, es);
      end
      hist.delete(edge_n - LATENCY);
    end
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      edge_n++;
      acc = acc + 64'(fcw);
      if (acc >= (64'd1 << 32)) begin acc -= (64'd1 << 32); wraps++; end
      hist[edge_n] = 16'(acc >> 16);
      @(negedge clk);
      check_edge();
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    run(3000);                                   // 1/256 of the clock
    fcw = 32'h0000_3001; fcw_changes++; run(6000);  // slow: sub-LSB phase steps
    fcw = 32'h7FF0_1234; fcw_changes++; run(3000);  // close to half the clock
    fcw = 32'h0123_4567; fcw_changes++; run(8000);
    for (int j = 0; j < 10; j++) begin
      fcw = $urandom; fcw_changes++; run(1500);
    end
    checks++; if (wraps == 0) failures++;
    checks++; if (fcw_changes == 0) failures++;
    for (int o = 0; o < 8; o++) begin checks++; if (oct_seen[o] == 0) failures++; end
    // theta < pi/4 keeps the top four angle bits at or below 12 (0.785*16)
    for (int r = 0; r <= 12; r++) begin checks++; if (rom_seen[r] == 0) failures++; end
    checks++; if (stage_pos == 0 || stage_neg == 0) failures++;
    checks++; if (merged_pos == 0 || merged_neg == 0) failures++;
    $display("max error %f LSB; wraps %0d, frequency changes %0d", max_err, wraps, fcw_changes);
    $display("octants %p", oct_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
