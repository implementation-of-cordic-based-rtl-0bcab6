// cordic_word_serial: folded (word-serial, iterative bit-parallel) CORDIC
// sine/cosine engine.
//
// A single micro-rotation datapath is used N_ITER times per angle. The x, y
// and accumulated-angle registers feed two barrel shifters, whose distance
// is the iteration counter, and the elementary-angle lookup table, addressed
// by the same counter. A small controller sequences the work:
//   IDLE   -- start: load the starting vector and the angle (1 clock)
//   ROTATE -- one micro-rotation per clock, counter 0 .. N_ITER-1
//   SCALE  -- multiply x and y by K with shifts and adds, register the
//             results as cos_o and sin_o and pulse done (1 clock)
// so done follows start by N_ITER + 2 clocks and a new start is accepted on
// the clock after done. A start while busy is ignored.
//
// The folded structure, the lookup table and the shift-add K compensation
// follow the processor's description; the start/busy/done handshake and the
// GUARD extra fraction bits are choices of this design.
//
// Interface: angle is signed DW-bit radians with FRAC fraction bits (Q2.22 by
// default); sin_o and cos_o have the same format and hold their value until
// the next done. rst_n is synchronous and returns the controller to IDLE.
module cordic_word_serial #(
  parameter int unsigned DW     = 24,
  parameter int unsigned FRAC   = 22,
  parameter int unsigned N_ITER = 22,
  parameter int unsigned GUARD  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] angle,
  output logic                 busy,
  output logic                 done,
  output logic signed [DW-1:0] sin_o,
  output logic signed [DW-1:0] cos_o
);
  localparam int unsigned W  = DW + GUARD + 1;  // one extra integer bit: t reaches pi/2 + 1.74 rad
  localparam int unsigned F  = FRAC + GUARD;
  localparam int unsigned SW = $clog2(N_ITER + 1);

  typedef enum logic [1:0] {IDLE, ROTATE, SCALE} state_t;

  state_t               state_q;
  logic        [SW-1:0] iter_q;
  logic signed [W-1:0]  x_q, y_q, t_q, target_q;

  logic signed [W-1:0]  x0, y0, t0, target0;
  logic signed [W-1:0]  atan_i, x_n, y_n, t_n;
  logic                 ccw_unused;
  logic signed [DW-1:0] sin_d, cos_d;

  cordic_init_vector #(.DW(DW), .W(W), .F(F), .GUARD(GUARD)) u_init (
    .angle  (angle),
    .x0     (x0),
    .y0     (y0),
    .t0     (t0),
    .target (target0)
  );

  cordic_atan_rom #(.W(W), .F(F), .SW(SW)) u_rom (
    .idx    (iter_q),
    .atan_o (atan_i)
  );

  cordic_microrot #(.W(W), .SW(SW)) u_rot (
    .x_i    (x_q),
    .y_i    (y_q),
    .t_i    (t_q),
    .target (target_q),
    .shift  (iter_q),
    .atan_i (atan_i),
    .x_o    (x_n),
    .y_o    (y_n),
    .t_o    (t_n),
    .ccw    (ccw_unused)
  );

  cordic_kscale #(.IW(W), .OW(DW), .KF(F + 1), .DROP(GUARD)) u_ks_sin (
    .v_i (y_q),
    .v_o (sin_d)
  );
  cordic_kscale #(.IW(W), .OW(DW), .KF(F + 1), .DROP(GUARD)) u_ks_cos (
    .v_i (x_q),
    .v_o (cos_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      iter_q  <= '0;
      done    <= 1'b0;
      x_q     <= '0;
      y_q     <= '0;
      t_q     <= '0;
      target_q <= '0;
      sin_o   <= '0;
      cos_o   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: begin
          if (start) begin
            x_q      <= x0;
            y_q      <= y0;
            t_q      <= t0;
            target_q <= target0;
            iter_q   <= '0;
            state_q  <= ROTATE;
          end
        end
        ROTATE: begin
          x_q <= x_n;
          y_q <= y_n;
          t_q <= t_n;
          if (iter_q == SW'(N_ITER - 1)) state_q <= SCALE;
          else                           iter_q  <= iter_q + 1'b1;
        end
        SCALE: begin
          sin_o   <= sin_d;
          cos_o   <= cos_d;
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy = (state_q != IDLE);

  // The iteration counter never addresses past the last micro-rotation, and
  // done is only raised on the way back to IDLE.
  a_iter_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    iter_q <= SW'(N_ITER - 1));
  a_done_idle:     assert property (@(posedge clk) disable iff (!rst_n)
                                    done |-> state_q == IDLE);

endmodule
