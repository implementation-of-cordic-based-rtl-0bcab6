// cordic_init_vector: chooses the starting vector of a rotation.
//
// An input angle of at most 45 degrees starts from (x, y) = (1, 0) with an
// accumulated angle of 0; a larger angle starts from (0, 1), which already
// lies at 90 degrees, so the accumulated angle starts at pi/2. The choice
// between the two starting vectors is the processor's own rule; the 90
// degree starting angle is what the (0, 1) vector implies. The input angle
// is widened by GUARD extra fraction bits to the datapath width W.
//
// With these starts the iterations, which can turn the vector by at most
// about 99.9 degrees in total, cover inputs from about -99.9 degrees up to
// the largest value of the input format (2 rad, 114.6 degrees).
//
// Interface: angle is signed with DW bits, F - GUARD fraction bits (radians);
// outputs are signed with W bits and F fraction bits. Combinational.
module cordic_init_vector #(
  parameter int unsigned DW    = 24,
  parameter int unsigned W     = 28,
  parameter int unsigned F     = 25,
  parameter int unsigned GUARD = 3
) (
  input  logic signed [DW-1:0] angle,
  output logic signed [W-1:0]  x0,
  output logic signed [W-1:0]  y0,
  output logic signed [W-1:0]  t0,
  output logic signed [W-1:0]  target
);
  import cordic_pkg::*;

  localparam logic [63:0] PI4_64 = q32_to(PI_4_Q32, F);
  localparam logic [63:0] PI2_64 = q32_to(PI_2_Q32, F);
  localparam logic signed [W-1:0] PI4 = PI4_64[W-1:0];
  localparam logic signed [W-1:0] PI2 = PI2_64[W-1:0];
  localparam logic signed [W-1:0] ONE = W'(1) << F;

  always_comb begin
    target = W'(angle) <<< GUARD;
    if (target <= PI4) begin
      x0 = ONE;
      y0 = '0;
      t0 = '0;
    end else begin
      x0 = '0;
      y0 = ONE;
      t0 = PI2;
    end
  end

endmodule
