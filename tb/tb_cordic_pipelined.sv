// tb_cordic_pipelined: streams angles into the pipelined engine on
// consecutive clocks (with some gaps), and checks that every result appears
// exactly N_ITER + 2 clocks after its angle, in order, with sine and cosine
// within TOL LSBs of the floating-point values. The angles include 0, 30, 45
// and 60 degrees, whose expected results the processor's documentation
// quotes (sin 30 = 0x200000, cos 30 = 0x376CF6 within a few LSBs), both
// sides of the 45 degree starting-vector threshold, negative angles and
// random angles over the convergent range (-99 .. 114 degrees).
module tb_cordic_pipelined;
  localparam int DW = 24, FRAC = 22, N_ITER = 22, GUARD = 3;
  localparam int LAT = N_ITER + 2;
  localparam int TOL = 6;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] angle = '0, sin_o, cos_o;
  int checks = 0, failures = 0, cycle = 0, n_out = 0, n_in = 0, max_err = 0, n_b2b = 0;
  logic prev_valid = 1'b0;
  longint q_angle[$];
  int     q_cycle[$];

  cordic_pipelined #(.DW(DW), .FRAC(FRAC), .N_ITER(N_ITER), .GUARD(GUARD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: samples inputs and outputs on the same clock edge, so the
  // difference of the edge counts is the latency in clocks.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      q_angle.push_back(longint'(angle));
      q_cycle.push_back(cycle);
      n_in++;
    end
    if (rst_n && out_valid && prev_valid) n_b2b++;
    prev_valid = out_valid;
    if (rst_n && out_valid) begin
      longint a;
      int c;
      real es, ec, ds, dc;
      n_out++;
      checks++;
      if (q_angle.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        a = q_angle.pop_front();
        c = q_cycle.pop_front();
        if (cycle - c != LAT) begin
          failures++;
          $display("FAIL latency %0d expected %0d", cycle - c, LAT);
        end
        es = cordic_tb_pkg::sin_q(a, FRAC);
        ec = cordic_tb_pkg::cos_q(a, FRAC);
        ds = cordic_tb_pkg::absr(real'(sin_o) - es);
        dc = cordic_tb_pkg::absr(real'(cos_o) - ec);
        if (int'(ds) > max_err) max_err = int'(ds);
        if (int'(dc) > max_err) max_err = int'(dc);
        if (ds > TOL || dc > TOL) begin
          failures++;
          $display("FAIL angle=%h sin=%h (exp %f) cos=%h (exp %f)", DW'(a), sin_o, es, cos_o, ec);
        end
      end
    end
  end

  // Driver: on each falling edge presents the next queued angle, or a
  // bubble when the queue holds a gap marker (GAP).
  localparam longint GAP = 64'h7FFF_FFFF_FFFF_FFFF;
  longint to_send[$];

  always @(negedge clk) begin
    in_valid <= 1'b0;
    if (rst_n && to_send.size() != 0) begin
      longint a;
      a = to_send.pop_front();
      if (a != GAP) begin
        angle    <= DW'(a);
        in_valid <= 1'b1;
      end
    end
  end

  initial begin
    to_send.push_back(0);
    to_send.push_back(cordic_tb_pkg::deg_to_q(30.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(45.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(60.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(90.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(-30.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(-99.0, FRAC));
    to_send.push_back(cordic_tb_pkg::deg_to_q(114.0, FRAC));
    repeat (3) to_send.push_back(GAP);
    for (int n = 0; n < 300; n++) begin
      to_send.push_back(cordic_tb_pkg::deg_to_q(-99.0 + 213.0 * real'($urandom_range(0, 100000)) / 100000.0, FRAC));
      if ($urandom_range(0, 7) == 0) to_send.push_back(GAP);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (to_send.size() == 0);
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_b2b < 100) begin
      failures++;
      $display("FAIL only %0d results on consecutive clocks", n_b2b);
    end
    checks++;
    if (n_out != n_in || q_angle.size() != 0) begin
      failures++;
      $display("FAIL sent %0d received %0d", n_in, n_out);
    end
    $display("max error %0d LSB, %0d results, %0d cycles", max_err, n_out, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
