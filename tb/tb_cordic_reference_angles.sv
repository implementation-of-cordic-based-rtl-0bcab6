// tb_cordic_reference_angles: runs the four example angles for which
// published results of this processor exist (0, 30, 45 and 60 degrees) through
// both engines of cordic_processor at its default parameters, and compares
// the outputs with those published values. The published values carry a few
// LSBs of error of their own (for example sin 30 = 0x200003, exact 0x200000),
// so each output must lie within TOL LSBs of the published value and also
// within 2 LSBs of the exact value.
module tb_cordic_reference_angles;
  localparam int DW = 24, FRAC = 22, N = 4, TOL = 8;

  typedef struct packed {
    logic [DW-1:0] angle;
    logic [DW-1:0] sin_pub;
    logic [DW-1:0] cos_pub;
  } ref_t;

  localparam ref_t REFS [N] = '{
    '{24'h000000, 24'h000000, 24'h400003},   // 0 deg
    '{24'h2182A4, 24'h200003, 24'h376CF9},   // 30 deg
    '{24'h3243F6, 24'h2D413A, 24'h2D4140},   // 45 deg
    '{24'h430548, 24'h376CF9, 24'h200003}    // 60 deg
  };

  logic clk = 0, rst_n = 0;
  logic p_in_valid = 0, p_out_valid;
  logic signed [DW-1:0] p_angle = '0, p_sin, p_cos;
  logic s_start = 0, s_busy, s_done;
  logic signed [DW-1:0] s_angle = '0, s_sin, s_cos;
  int checks = 0, failures = 0;

  cordic_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void compare(input string who, input int k,
                                  input logic signed [DW-1:0] s, input logic signed [DW-1:0] c);
    real es, ec;
    es = cordic_tb_pkg::sin_q(longint'($signed(REFS[k].angle)), FRAC);
    ec = cordic_tb_pkg::cos_q(longint'($signed(REFS[k].angle)), FRAC);
    $display("%-10s angle %h: sin %h (published %h)  cos %h (published %h)",
             who, REFS[k].angle, s, REFS[k].sin_pub, c, REFS[k].cos_pub);
    checks++;
    if (cordic_tb_pkg::absr(real'(s) - real'($signed(REFS[k].sin_pub))) > TOL ||
        cordic_tb_pkg::absr(real'(c) - real'($signed(REFS[k].cos_pub))) > TOL) begin
      failures++;
      $display("FAIL %s: far from the published value", who);
    end
    checks++;
    if (cordic_tb_pkg::absr(real'(s) - es) > 2.0 || cordic_tb_pkg::absr(real'(c) - ec) > 2.0) begin
      failures++;
      $display("FAIL %s: more than 2 LSB from the exact value", who);
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < N; k++) begin
      // pipelined engine
      @(negedge clk);
      p_angle    = REFS[k].angle;
      p_in_valid = 1'b1;
      @(negedge clk);
      p_in_valid = 1'b0;
      while (!p_out_valid) @(negedge clk);
      compare("pipelined", k, p_sin, p_cos);
      // word-serial engine
      s_angle = REFS[k].angle;
      s_start = 1'b1;
      @(negedge clk);
      s_start = 1'b0;
      while (!s_done) @(negedge clk);
      compare("serial", k, s_sin, s_cos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
