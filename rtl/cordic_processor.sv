// cordic_processor: CORDIC sine/cosine processor, top level.
//
// Holds the two architectures of the processor side by side, each with its
// own ports: the unfolded pipelined engine (one result per clock, latency
// N_ITER + 2) and the folded word-serial engine (one result every
// N_ITER + 2 clocks, one micro-rotation datapath). Both take an angle in
// radians, signed, DW bits with FRAC fraction bits (Q2.22 by default, e.g.
// 30 degrees = 0x2182A4), and return sine and cosine in the same format.
// Bringing both engines out at once is a choice of this design; a user
// needing one of them leaves the other's inputs at zero and synthesis
// removes it.
module cordic_processor #(
  parameter int unsigned DW     = 24,
  parameter int unsigned FRAC   = 22,
  parameter int unsigned N_ITER = 22,
  parameter int unsigned GUARD  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pipelined engine
  input  logic                 p_in_valid,
  input  logic signed [DW-1:0] p_angle,
  output logic                 p_out_valid,
  output logic signed [DW-1:0] p_sin,
  output logic signed [DW-1:0] p_cos,
  // word-serial engine
  input  logic                 s_start,
  input  logic signed [DW-1:0] s_angle,
  output logic                 s_busy,
  output logic                 s_done,
  output logic signed [DW-1:0] s_sin,
  output logic signed [DW-1:0] s_cos
);

  cordic_pipelined #(.DW(DW), .FRAC(FRAC), .N_ITER(N_ITER), .GUARD(GUARD)) u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p_in_valid),
    .angle     (p_angle),
    .out_valid (p_out_valid),
    .sin_o     (p_sin),
    .cos_o     (p_cos)
  );

  cordic_word_serial #(.DW(DW), .FRAC(FRAC), .N_ITER(N_ITER), .GUARD(GUARD)) u_serial (
    .clk   (clk),
    .rst_n (rst_n),
    .start (s_start),
    .angle (s_angle),
    .busy  (s_busy),
    .done  (s_done),
    .sin_o (s_sin),
    .cos_o (s_cos)
  );

endmodule
