// tb_cordic_atan_rom: checks every entry of the elementary-angle table
// against atan(2^-i) computed in floating point (must agree to within half
// an LSB plus rounding slack, i.e. be the nearest integer or next to it) and
// that entries past the 32-entry master table are zero.
module tb_cordic_atan_rom;
  localparam int W = 28, F = 25, SW = 6;

  logic [SW-1:0] idx;
  logic [W-1:0]  atan_o;
  int checks = 0, failures = 0;

  cordic_atan_rom #(.W(W), .F(F), .SW(SW)) dut (.idx(idx), .atan_o(atan_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << SW); i++) begin
      real expv, err;
      idx = SW'(i);
      #1;
      expv = (i < 32) ? $atan(2.0 ** (-i)) * (2.0 ** F) : 0.0;
      err  = real'(atan_o) - expv;
      checks++;
      if (err > 0.5001 || err < -0.5001) begin
        failures++;
        $display("FAIL idx=%0d got=%0d exp=%f", i, atan_o, expv);
      end
    end
    // first two entries in degrees: 45 and 26.565
    idx = 0; #1;
    checks++;
    if (cordic_tb_pkg::absr(real'(atan_o) / (2.0 ** F) * 180.0 / cordic_tb_pkg::PI - 45.0) > 1e-5) failures++;
    idx = 1; #1;
    checks++;
    if (cordic_tb_pkg::absr(real'(atan_o) / (2.0 ** F) * 180.0 / cordic_tb_pkg::PI - 26.565051) > 1e-5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
