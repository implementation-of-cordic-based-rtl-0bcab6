// tb_cordic_microrot: drives random vectors, angles and shift distances into
// one micro-rotation and compares with x -/+ floor(y / 2^i),
// y +/- floor(x / 2^i), t +/- atan, the sign chosen by comparing the target
// angle with t (anticlockwise when target >= t). Also checks that both
// directions and the equal case occur.
module tb_cordic_microrot;
  localparam int W = 28, SW = 5;

  logic signed [W-1:0] x_i, y_i, t_i, target, atan_i, x_o, y_o, t_o;
  logic [SW-1:0] shift;
  logic ccw;
  int checks = 0, failures = 0, n_ccw = 0, n_cw = 0;

  cordic_microrot #(.W(W), .SW(SW)) dut (.*);

  function automatic longint floordiv(input longint a, input int s);
    longint d, q;
    d = longint'(1) << s;
    q = a / d;
    if ((a % d != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic longint rnd(input int bits);
    longint v;
    v = longint'($urandom) % (longint'(1) << (bits - 1));
    if ($urandom_range(0, 1) == 1) v = -v;
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint xe, ye, te, xv, yv, tv, gv, av;
      int s;
      bit dir;
      xv = rnd(W - 1); yv = rnd(W - 1); tv = rnd(W - 2); av = rnd(W - 3);
      gv = (n % 50 == 0) ? tv : rnd(W - 2);
      s  = $urandom_range(0, 24);
      x_i = W'(xv); y_i = W'(yv); t_i = W'(tv); target = W'(gv); atan_i = W'(av);
      shift = SW'(s);
      #1;
      dir = (gv >= tv);
      if (dir) begin
        xe = xv - floordiv(yv, s); ye = yv + floordiv(xv, s); te = tv + av;
      end else begin
        xe = xv + floordiv(yv, s); ye = yv - floordiv(xv, s); te = tv - av;
      end
      if (ccw) n_ccw++; else n_cw++;
      checks++;
      if (longint'(x_o) != xe || longint'(y_o) != ye || longint'(t_o) != te || ccw != dir) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d t=%0d g=%0d s=%0d -> %0d %0d %0d exp %0d %0d %0d",
                   xv, yv, tv, gv, s, x_o, y_o, t_o, xe, ye, te);
      end
    end
    checks++;
    if (n_ccw == 0 || n_cw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
