// ddfs_top: sine/cosine direct digital frequency synthesizer using vector
// rotation with angle recoding.
//
// Datapath, one register per block:
//   PA  phase accumulator: phase += fcw, truncated to PHASE_W bits
//   CDR octant folder (CI) + multiplier by pi/4 (M): theta in (0, pi/4)
//   ROM start vector for the first ROM_BITS recoded digits
//   ROT shift-and-add half-rotation stages k = ROM_BITS+2 .. MERGE_K-1
//   MRG stages k = MERGE_K .. THETA_W+1 merged into one (MERGE_K = p/2)
//   OS  unfold the octant, round to DATA_W bits
// cos_out/sin_out are A cos(2 pi phase / 2^PHASE_W) and A sin(...), with
// A = 2^(DATA_W-1) - 1, as signed two's-complement words.
//
// Interface: fcw is the frequency control word (f_out = fcw/2^ACC_W * f_clk);
// valid rises once the first accumulated phase has reached the output.
// Timing: one result per clock; the phase held in the accumulator after a
// clock edge appears at the outputs LATENCY = 4 + (MERGE_K - ROM_BITS - 2)
// edges later (6 at the defaults); valid rises 7 edges after reset.
// The block chain follows the synthesizer architecture of the method; the
// word lengths (32-bit fcw, 16-bit phase, 16-bit output, 2 guard bits) and
// the per-block pipeline registers are this design's choices.
module ddfs_top #(
  parameter int unsigned ACC_W       = 32,
  parameter int unsigned PHASE_W     = 16,
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned GUARD       = 2,
  parameter int unsigned ROM_BITS    = 4,
  parameter bit          USE_HW_MULT = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ACC_W-1:0]         fcw,
  output logic                     valid,
  output logic signed [DATA_W-1:0] cos_out,
  output logic signed [DATA_W-1:0] sin_out
);

  localparam int unsigned THETA_W = DATA_W + GUARD;
  localparam int unsigned IW      = DATA_W + GUARD + 1;
  localparam int unsigned MERGE_K = ddfs_pkg::merge_start(DATA_W);
  localparam int unsigned K_FIRST = ROM_BITS + 2;
  localparam int unsigned NSTAGE  = MERGE_K - K_FIRST;

  // Elaboration-time checks of the parameter constraints
  if (ROM_BITS + 2 > MERGE_K) begin : g_bad_rom_bits
    $error("ROM_BITS + 2 must not exceed DATA_W/2, the first merged stage");
  end
  if (PHASE_W + 10 <= THETA_W) begin : g_bad_phase_w
    $error("PHASE_W + 10 must exceed DATA_W + GUARD for the pi/4 product");
  end
  if (GUARD < 1 || PHASE_W < 4) begin : g_bad_guard
    $error("GUARD must be at least 1 and PHASE_W at least 4");
  end

  // PA
  logic [PHASE_W-1:0] phase;
  logic               pa_valid;

  phase_accumulator #(.ACC_W(ACC_W), .PHASE_W(PHASE_W)) u_pa (
    .clk  (clk),
    .rst_n(rst_n),
    .fcw  (fcw),
    .phase(phase),
    .valid(pa_valid)
  );

  // CDR
  logic               cdr_valid;
  logic [2:0]         cdr_oct;
  logic [THETA_W-1:0] cdr_theta;

  radian_converter #(
    .PHASE_W    (PHASE_W),
    .THETA_W    (THETA_W),
    .USE_HW_MULT(USE_HW_MULT)
  ) u_cdr (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (pa_valid),
    .phase    (phase),
    .valid_out(cdr_valid),
    .octant   (cdr_oct),
    .theta    (cdr_theta)
  );

  // ROM and the shift-and-add stages; index 0 is the ROM output.
  logic                 st_valid [NSTAGE+1];
  logic [2:0]           st_oct   [NSTAGE+1];
  logic [THETA_W-1:0]   st_theta [NSTAGE+1];
  logic signed [IW-1:0] st_x     [NSTAGE+1];
  logic signed [IW-1:0] st_y     [NSTAGE+1];

  sincos_rom #(
    .ROM_BITS(ROM_BITS),
    .THETA_W (THETA_W),
    .DATA_W  (DATA_W),
    .GUARD   (GUARD),
    .IW      (IW)
  ) u_rom (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (cdr_valid),
    .octant_in (cdr_oct),
    .theta_in  (cdr_theta),
    .valid_out (st_valid[0]),
    .octant_out(st_oct[0]),
    .theta_out (st_theta[0]),
    .x_out     (st_x[0]),
    .y_out     (st_y[0])
  );

  for (genvar s = 0; s < NSTAGE; s++) begin : g_rot
    rotation_stage #(
      .IW     (IW),
      .THETA_W(THETA_W),
      .K      (K_FIRST + s)
    ) u_rot (
      .clk       (clk),
      .rst_n     (rst_n),
      .valid_in  (st_valid[s]),
      .octant_in (st_oct[s]),
      .theta_in  (st_theta[s]),
      .x_in      (st_x[s]),
      .y_in      (st_y[s]),
      .valid_out (st_valid[s+1]),
      .octant_out(st_oct[s+1]),
      .theta_out (st_theta[s+1]),
      .x_out     (st_x[s+1]),
      .y_out     (st_y[s+1])
    );
  end

  // Merged end stages
  logic                 mrg_valid;
  logic [2:0]           mrg_oct;
  logic signed [IW-1:0] mrg_x, mrg_y;

  merged_stages #(
    .IW     (IW),
    .THETA_W(THETA_W),
    .K0     (MERGE_K)
  ) u_mrg (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (st_valid[NSTAGE]),
    .octant_in (st_oct[NSTAGE]),
    .theta_in  (st_theta[NSTAGE]),
    .x_in      (st_x[NSTAGE]),
    .y_in      (st_y[NSTAGE]),
    .valid_out (mrg_valid),
    .octant_out(mrg_oct),
    .x_out     (mrg_x),
    .y_out     (mrg_y)
  );

  // OS
  output_stage #(
    .DATA_W(DATA_W),
    .GUARD (GUARD),
    .IW    (IW)
  ) u_os (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (mrg_valid),
    .octant_in(mrg_oct),
    .x_in     (mrg_x),
    .y_in     (mrg_y),
    .valid_out(valid),
    .cos_out  (cos_out),
    .sin_out  (sin_out)
  );

endmodule
