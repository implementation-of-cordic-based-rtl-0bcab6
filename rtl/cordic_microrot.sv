// cordic_microrot: one CORDIC micro-rotation in rotation mode.
//
// The accumulated angle t_i is compared with the target (input) angle. If
// the target is at or ahead of t_i the vector is turned anticlockwise by the
// elementary angle atan(2^-i):
//     x_o = x_i - (y_i >>> i),  y_o = y_i + (x_i >>> i),  t_o = t_i + atan_i
// otherwise clockwise, with the three signs swapped. The shifts are
// arithmetic, so the rotation needs no multiplier, only two shifters and
// three adder/subtractors. Each step also stretches the vector by
// sqrt(1 + 2^-2i); that gain is removed once, after the last step.
//
// Comparing the accumulated angle with the input angle (rather than driving
// a residual angle to zero) follows the processor's published design steps.
// In a fixed-index (unrolled) instance the shifter reduces to wiring.
//
// Interface: all values are two's complement with the same width W; shift
// is the iteration index i. Purely combinational.
module cordic_microrot #(
  parameter int unsigned W  = 28,
  parameter int unsigned SW = 5
) (
  input  logic signed [W-1:0]  x_i,
  input  logic signed [W-1:0]  y_i,
  input  logic signed [W-1:0]  t_i,
  input  logic signed [W-1:0]  target,
  input  logic        [SW-1:0] shift,
  input  logic signed [W-1:0]  atan_i,
  output logic signed [W-1:0]  x_o,
  output logic signed [W-1:0]  y_o,
  output logic signed [W-1:0]  t_o,
  output logic                 ccw
);
  logic signed [W-1:0] xs, ys;

  always_comb begin
    xs  = x_i >>> shift;
    ys  = y_i >>> shift;
    ccw = (target >= t_i);
    if (ccw) begin
      x_o = x_i - ys;
      y_o = y_i + xs;
      t_o = t_i + atan_i;
    end else begin
      x_o = x_i + ys;
      y_o = y_i - xs;
      t_o = t_i - atan_i;
    end
  end

endmodule
