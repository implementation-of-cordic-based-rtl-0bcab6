// cordic_kscale: multiplies by the CORDIC gain compensation K with shifts and adds.
//
// After n micro-rotations the vector is longer by 1/K, K = 0.60725. This
// block forms K * v_i as the sum of v_i shifted left by b for every set bit b
// of K rounded to KF fraction bits (a constant multiplier built only from
// shifters and adders, as the processor's design prescribes). The sum has
// KF + DROP fraction bits too many; it is rounded to nearest and the top OW
// bits kept. KF, the rounding and the DROP guard bits are choices of this
// design.
//
// Interface: v_i is signed with IW bits; v_o is signed with OW bits, whose
// fraction is DROP bits shorter than v_i's. Combinational.
module cordic_kscale #(
  parameter int unsigned IW   = 28,
  parameter int unsigned OW   = 24,
  parameter int unsigned KF   = 26,   // fraction bits kept of K
  parameter int unsigned DROP = 3     // guard bits removed at the output
) (
  input  logic signed [IW-1:0] v_i,
  output logic signed [OW-1:0] v_o
);
  import cordic_pkg::*;

  localparam logic [63:0] K64 = q32_to(K_Q32, KF);
  localparam logic [KF:0] KC  = K64[KF:0];
  localparam int unsigned PW  = IW + KF + 1;
  localparam int unsigned SH  = KF + DROP;

  logic signed [PW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int b = 0; b <= int'(KF); b++) begin
      if (KC[b]) acc = acc + (PW'(v_i) <<< b);
    end
    v_o = OW'((acc + (PW'(1) <<< (SH - 1))) >>> SH);
  end

endmodule
