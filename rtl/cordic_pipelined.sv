// cordic_pipelined: unfolded (pipelined) CORDIC sine/cosine engine.
//
// The iteration loop of the algorithm is unrolled into N_ITER processing
// elements; element i always performs micro-rotation i, so its shift
// distance and its elementary angle atan(2^-i) are constants. A register
// follows the initial-vector selection, every element, and the final gain
// compensation, so a new angle is accepted on every clock and its result
// appears N_ITER + 2 clocks later with out_valid. There is no back-pressure.
//
// The unfolded structure, the per-iteration elements and the shift-add K
// compensation follow the processor's description; the register placement,
// the valid bit and the GUARD extra fraction bits in the datapath are choices
// of this design.
//
// Interface: angle is signed DW-bit radians with FRAC fraction bits (Q2.22 by
// default); sin_o and cos_o have the same format. rst_n is synchronous and
// clears only the valid pipeline; data registers are not reset.
module cordic_pipelined #(
  parameter int unsigned DW     = 24,
  parameter int unsigned FRAC   = 22,
  parameter int unsigned N_ITER = 22,
  parameter int unsigned GUARD  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] angle,
  output logic                 out_valid,
  output logic signed [DW-1:0] sin_o,
  output logic signed [DW-1:0] cos_o
);
  localparam int unsigned W  = DW + GUARD + 1;  // one extra integer bit: t reaches pi/2 + 1.74 rad
  localparam int unsigned F  = FRAC + GUARD;
  localparam int unsigned SW = $clog2(N_ITER + 1);

  typedef struct packed {
    logic signed [W-1:0] x;
    logic signed [W-1:0] y;
    logic signed [W-1:0] t;
    logic signed [W-1:0] target;
  } stage_t;

  // stage_q[0] holds the starting vector; stage_q[k] the result of k rotations.
  stage_t              stage_q [N_ITER+1];
  logic [N_ITER:0]     valid_q;

  stage_t              init_d;

  cordic_init_vector #(.DW(DW), .W(W), .F(F), .GUARD(GUARD)) u_init (
    .angle  (angle),
    .x0     (init_d.x),
    .y0     (init_d.y),
    .t0     (init_d.t),
    .target (init_d.target)
  );

  always_ff @(posedge clk) stage_q[0] <= init_d;

  for (genvar k = 0; k < N_ITER; k++) begin : g_stage
    logic signed [W-1:0] atan_k;
    stage_t              next_d;
    logic                ccw_unused;

    cordic_atan_rom #(.W(W), .F(F), .SW(SW)) u_rom (
      .idx    (SW'(k)),
      .atan_o (atan_k)
    );

    cordic_microrot #(.W(W), .SW(SW)) u_rot (
      .x_i    (stage_q[k].x),
      .y_i    (stage_q[k].y),
      .t_i    (stage_q[k].t),
      .target (stage_q[k].target),
      .shift  (SW'(k)),
      .atan_i (atan_k),
      .x_o    (next_d.x),
      .y_o    (next_d.y),
      .t_o    (next_d.t),
      .ccw    (ccw_unused)
    );
    assign next_d.target = stage_q[k].target;

    always_ff @(posedge clk) stage_q[k+1] <= next_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[N_ITER-1:0], in_valid};
  end

  logic signed [DW-1:0] sin_d, cos_d;

  cordic_kscale #(.IW(W), .OW(DW), .KF(F + 1), .DROP(GUARD)) u_ks_sin (
    .v_i (stage_q[N_ITER].y),
    .v_o (sin_d)
  );
  cordic_kscale #(.IW(W), .OW(DW), .KF(F + 1), .DROP(GUARD)) u_ks_cos (
    .v_i (stage_q[N_ITER].x),
    .v_o (cos_d)
  );

  always_ff @(posedge clk) begin
    sin_o <= sin_d;
    cos_o <= cos_d;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= valid_q[N_ITER];
  end

endmodule
