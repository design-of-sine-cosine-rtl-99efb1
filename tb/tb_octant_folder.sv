// tb_octant_folder: sweeps every 16-bit phase and checks that the octant is
// the phase's position in eighths of a turn and that frac, read as a
// fraction, is the distance (plus half an LSB) from the even octant
// boundary below, or from the even boundary above in odd octants.
module tb_octant_folder;
  localparam int unsigned PHASE_W = 16;
  logic [PHASE_W-1:0] phase;
  logic [2:0] octant;
  logic [PHASE_W-3:0] frac;
  int checks = 0, failures = 0;

  octant_folder dut (.phase, .octant, .frac);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real turn, pos, expf, gotf;
    for (int p = 0; p < (1 << PHASE_W); p++) begin
      phase = PHASE_W'(p);
      #1;
      turn = (real'(p) + 0.5) / real'(1 << PHASE_W) * 8.0;  // in octants
      pos  = turn - $floor(turn);
      expf = ((int'($floor(turn)) % 2) == 1) ? 1.0 - pos : pos;
      gotf = real'(frac) / real'(1 << (PHASE_W - 2));
      checks++;
      if (int'(octant) != int'($floor(turn)) || (gotf - expf) > 1e-9 || (expf - gotf) > 1e-9) begin
        failures++;
        if (failures < 10) $display("p=%0d octant=%0d frac=%0d expf=%f", p, octant, frac, expf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
