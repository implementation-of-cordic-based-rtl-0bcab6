// tb_cordic_init_vector: checks the starting-vector rule on angles around
// the 45 degree threshold and across the input range: (1, 0) with t = 0 up
// to and including 45 degrees, (0, 1) with t = pi/2 beyond; and that the
// angle is widened by the guard bits without changing its value.
module tb_cordic_init_vector;
  localparam int DW = 24, FRAC = 22, GUARD = 3, W = DW + GUARD + 1, F = FRAC + GUARD;

  logic signed [DW-1:0] angle;
  logic signed [W-1:0]  x0, y0, t0, target;
  int checks = 0, failures = 0;

  cordic_init_vector #(.DW(DW), .W(W), .F(F), .GUARD(GUARD)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint a);
    real ar, pi4;
    bit  low;
    angle = DW'(a);
    #1;
    ar  = real'(a) / (2.0 ** FRAC);
    pi4 = cordic_tb_pkg::PI / 4.0;
    low = (ar <= pi4 + 1e-9);
    checks++;
    if (low) begin
      if (x0 != (W'(1) <<< F) || y0 != 0 || t0 != 0) failures++;
    end else begin
      if (x0 != 0 || y0 != (W'(1) <<< F) ||
          cordic_tb_pkg::absr(real'(t0) - cordic_tb_pkg::PI / 2.0 * (2.0 ** F)) > 0.51) failures++;
    end
    checks++;
    if (longint'(target) != a * (1 << GUARD)) failures++;
  endtask

  initial begin
    longint q45;
    q45 = cordic_tb_pkg::deg_to_q(45.0, FRAC);   // 0x3243F6
    check(0);
    check(q45 - 1);
    check(q45);
    check(q45 + 1);
    check(q45 + 2);
    check(cordic_tb_pkg::deg_to_q(30.0, FRAC));
    check(cordic_tb_pkg::deg_to_q(60.0, FRAC));
    check(cordic_tb_pkg::deg_to_q(-90.0, FRAC));
    check(cordic_tb_pkg::deg_to_q(110.0, FRAC));
    for (int n = 0; n < 200; n++) check(longint'($signed(DW'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
