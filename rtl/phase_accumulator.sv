// phase_accumulator: the phase accumulator (PA) of the synthesizer.
//
// Every clock the ACC_W-bit frequency control word fcw is added to the
// accumulator, which wraps modulo 2^ACC_W; the output frequency is
// fcw / 2^ACC_W times the clock rate. The PHASE_W most significant bits are
// the truncated phase handed to the rest of the datapath; phase / 2^PHASE_W
// is the fraction of a full turn.
//
// Timing: phase and valid are registered. After reset the accumulator holds 0
// and valid rises on the first clock edge; a new fcw is used from the next
// edge, so frequency changes keep the phase continuous.
// The accumulate-and-truncate structure follows the method; the widths
// (32-bit word, 16-bit phase) and the reset are this design's choices.
module phase_accumulator #(
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ACC_W-1:0]   fcw,
  output logic [PHASE_W-1:0] phase,
  output logic               valid
);

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      valid <= 1'b0;
    end else begin
      acc   <= acc + fcw;
      valid <= 1'b1;
    end
  end

  assign phase = acc[ACC_W-1 -: PHASE_W];

endmodule
