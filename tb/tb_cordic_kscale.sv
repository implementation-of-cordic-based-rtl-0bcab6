// tb_cordic_kscale: drives random and edge values into the shift-add gain
// compensation and compares with v * 0.6072529350 / 2^DROP computed in
// floating point; the result must be within one LSB.
module tb_cordic_kscale;
  localparam int IW = 28, OW = 24, KF = 26, DROP = 3;
  localparam real K = 0.60725293500888;

  logic signed [IW-1:0] v_i;
  logic signed [OW-1:0] v_o;
  int checks = 0, failures = 0;

  cordic_kscale #(.IW(IW), .OW(OW), .KF(KF), .DROP(DROP)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint v);
    real expv;
    v_i = IW'(v);
    #1;
    expv = real'(v) * K / (2.0 ** DROP);
    checks++;
    if (cordic_tb_pkg::absr(real'(v_o) - expv) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d got=%0d exp=%f", v, v_o, expv);
    end
  endtask

  initial begin
    check(0);
    check(1 << 25);                    // 1.0 in the input format
    check(-(1 << 25));
    check((1 << 26) - 1);              // largest
    check(-(1 << 26));                 // smallest
    check(55261300);                   // 1.6468 / K-scaled unit vector
    for (int n = 0; n < 2000; n++) check(longint'($signed((IW-1)'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
