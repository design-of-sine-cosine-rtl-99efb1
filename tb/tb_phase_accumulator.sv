// tb_phase_accumulator: checks the phase accumulator against a 64-bit
// software accumulator reduced modulo 2^ACC_W, for random frequency words
// changed every few clocks, including the wrap-around and the reset value.
module tb_phase_accumulator;
  localparam int unsigned ACC_W = 32, PHASE_W = 16;
  logic clk = 0, rst_n = 0;
  logic [ACC_W-1:0] fcw = '0;
  logic [PHASE_W-1:0] phase;
  logic valid;
  int checks = 0, failures = 0, wraps = 0;
  longint unsigned model = 0, prev = 0;

  phase_accumulator dut (.clk, .rst_n, .fcw, .phase, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (phase != 0 || valid) failures++;
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      if (i % 37 == 0) fcw = $urandom;
      @(posedge clk);
      prev  = model;
      model = (model + fcw) & ((64'd1 << ACC_W) - 1);
      if (model < prev) wraps++;
      @(negedge clk);
      checks++;
      if (!valid || phase != PHASE_W'(model >> (ACC_W - PHASE_W))) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: phase %h model %h", i, phase, model);
      end
    end
    checks++; if (wraps == 0) failures++;
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
