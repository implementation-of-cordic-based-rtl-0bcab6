// tb_cordic_word_serial: runs the folded engine on the documented angles
// (0, 30, 45, 60 degrees), both sides of the 45 degree threshold and random
// angles over the convergent range. Checks: done comes exactly N_ITER + 2
// clocks after start, busy is high in between, sine and cosine are within
// TOL LSBs of floating point, results hold after done, and a start pulse
// while busy is ignored.
module tb_cordic_word_serial;
  localparam int DW = 24, FRAC = 22, N_ITER = 22, GUARD = 3;
  localparam int LAT = N_ITER + 2;
  localparam int TOL = 6;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [DW-1:0] angle = '0, sin_o, cos_o;
  int checks = 0, failures = 0, max_err = 0;

  cordic_word_serial #(.DW(DW), .FRAC(FRAC), .N_ITER(N_ITER), .GUARD(GUARD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a, input bit poke_busy);
    int  lat;
    real es, ec, ds, dc;
    logic signed [DW-1:0] s_hold, c_hold;
    angle <= DW'(a);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    angle <= '0;
    lat = 1;
    while (1) begin
      @(posedge clk);
      #1;
      if (done) break;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during run"); end
      if (poke_busy && lat == 5) begin
        start <= 1'b1;           // must be ignored
        angle <= DW'(cordic_tb_pkg::deg_to_q(10.0, FRAC));
      end else begin
        start <= 1'b0;
      end
      lat++;
      if (lat > 2 * LAT) break;
    end
    start <= 1'b0;
    lat++;
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d expected %0d", lat, LAT); end
    es = cordic_tb_pkg::sin_q(a, FRAC);
    ec = cordic_tb_pkg::cos_q(a, FRAC);
    ds = cordic_tb_pkg::absr(real'(sin_o) - es);
    dc = cordic_tb_pkg::absr(real'(cos_o) - ec);
    if (int'(ds) > max_err) max_err = int'(ds);
    if (int'(dc) > max_err) max_err = int'(dc);
    checks++;
    if (ds > TOL || dc > TOL) begin
      failures++;
      $display("FAIL angle=%h sin=%h (exp %f) cos=%h (exp %f)", DW'(a), sin_o, es, cos_o, ec);
    end
    s_hold = sin_o; c_hold = cos_o;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (busy || done || sin_o != s_hold || cos_o != c_hold) begin
      failures++; $display("FAIL outputs not held / engine restarted");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0, 0);
    run(cordic_tb_pkg::deg_to_q(30.0, FRAC), 1);
    run(cordic_tb_pkg::deg_to_q(45.0, FRAC), 0);
    run(cordic_tb_pkg::deg_to_q(60.0, FRAC), 0);
    run(cordic_tb_pkg::deg_to_q(90.0, FRAC), 0);
    run(cordic_tb_pkg::deg_to_q(-99.0, FRAC), 0);
    run(cordic_tb_pkg::deg_to_q(114.0, FRAC), 0);
    for (int n = 0; n < 100; n++)
      run(cordic_tb_pkg::deg_to_q(-99.0 + 213.0 * real'($urandom_range(0, 100000)) / 100000.0, FRAC),
          n % 10 == 0);
    $display("max error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
