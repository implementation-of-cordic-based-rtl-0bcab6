// tb_cordic_processor: end-to-end test of the processor at its default
// parameters (24-bit Q2.22 angles, 22 iterations).
//
// The same list of angles is sent to both engines: to the pipelined engine
// as one stream with occasional bubbles, and to the word-serial engine one
// at a time. Every result is compared with floating-point sine and cosine
// (within TOL LSBs), the two engines' results for the same angle are
// compared with each other, and both latencies are checked (N_ITER + 2
// clocks). The test counts how often each mechanism of the design was
// exercised and fails if one never was:
//   - pipelined results on consecutive clocks (full throughput)
//   - bubbles in the pipelined stream
//   - the (1, 0) starting vector (angle <= 45 degrees), on both engines
//   - the (0, 1) starting vector (angle > 45 degrees), on both engines
//   - a start pulse to the busy word-serial engine, which must be ignored
//   - both rotation directions inside the iteration loop
// The angles include 0, 30, 45 and 60 degrees, the values for which the
// processor's documentation quotes results.
module tb_cordic_processor;
  localparam int DW = 24, FRAC = 22, N_ITER = 22;
  localparam int LAT = N_ITER + 2;
  localparam int TOL = 6;
  localparam int N_RANDOM = 200;
  localparam longint GAP = 64'h7FFF_FFFF_FFFF_FFFF;

  logic clk = 0, rst_n = 0;
  logic p_in_valid = 0, p_out_valid;
  logic signed [DW-1:0] p_angle = '0, p_sin, p_cos;
  logic s_start = 0, s_busy, s_done;
  logic signed [DW-1:0] s_angle = '0, s_sin, s_cos;

  int checks = 0, failures = 0, cycle = 0;
  int n_b2b = 0, n_bubble = 0, n_low_p = 0, n_high_p = 0, n_low_s = 0, n_high_s = 0;
  int n_ignored = 0, n_ccw = 0, n_cw = 0, n_p = 0, n_s = 0;
  longint angles[$];
  longint to_send[$];
  longint p_q[$];
  int     p_c[$];
  logic signed [DW-1:0] p_sin_res[longint], p_cos_res[longint];
  logic prev_valid = 1'b0;

  cordic_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_result(input string who, input longint a,
                                       input logic signed [DW-1:0] s,
                                       input logic signed [DW-1:0] c);
    real es, ec;
    es = cordic_tb_pkg::sin_q(a, FRAC);
    ec = cordic_tb_pkg::cos_q(a, FRAC);
    checks++;
    if (cordic_tb_pkg::absr(real'(s) - es) > TOL || cordic_tb_pkg::absr(real'(c) - ec) > TOL) begin
      failures++;
      $display("FAIL %s angle=%h sin=%h (exp %f) cos=%h (exp %f)", who, DW'(a), s, es, c, ec);
    end
  endfunction

  // Direction decisions of the pipeline's micro-rotation stages.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_pipe.g_stage[3].ccw_unused) n_ccw++;
      else                                  n_cw++;
    end
  end

  // Pipelined engine: driver on the falling edge, monitor on the rising edge.
  always @(negedge clk) begin
    p_in_valid <= 1'b0;
    if (rst_n && to_send.size() != 0) begin
      longint a;
      a = to_send.pop_front();
      if (a != GAP) begin
        p_angle    <= DW'(a);
        p_in_valid <= 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && p_in_valid) begin
      p_q.push_back(longint'(p_angle));
      p_c.push_back(cycle);
    end else if (rst_n && n_p > 0 && p_q.size() != 0) begin
      n_bubble++;
    end
    if (rst_n && p_out_valid && prev_valid) n_b2b++;
    prev_valid = p_out_valid;
    if (rst_n && p_out_valid) begin
      longint a;
      int c;
      n_p++;
      checks++;
      if (p_q.size() == 0) begin
        failures++;
        $display("FAIL pipelined: unexpected output");
      end else begin
        a = p_q.pop_front();
        c = p_c.pop_front();
        if (cycle - c != LAT) begin
          failures++;
          $display("FAIL pipelined latency %0d", cycle - c);
        end
        check_result("pipelined", a, p_sin, p_cos);
        if (a <= cordic_tb_pkg::deg_to_q(45.0, FRAC)) n_low_p++; else n_high_p++;
        p_sin_res[a] = p_sin;
        p_cos_res[a] = p_cos;
      end
    end
  end

  // Word-serial engine: one angle at a time.
  task automatic serial_run(input longint a, input bit poke);
    int lat;
    s_angle <= DW'(a);
    s_start <= 1'b1;
    @(posedge clk);
    s_start <= 1'b0;
    lat = 1;
    while (1) begin
      @(posedge clk);
      #1;
      if (s_done || lat > 2 * LAT) break;
      if (poke && lat == 3) begin
        s_start <= 1'b1;                    // engine is busy: must be ignored
        s_angle <= DW'(cordic_tb_pkg::deg_to_q(10.0, FRAC));
        n_ignored++;
      end else begin
        s_start <= 1'b0;
      end
      lat++;
    end
    s_start <= 1'b0;
    lat++;
    n_s++;
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("FAIL serial latency %0d", lat);
    end
    check_result("serial", a, s_sin, s_cos);
    if (a <= cordic_tb_pkg::deg_to_q(45.0, FRAC)) n_low_s++; else n_high_s++;
    @(posedge clk);
    #1;
    checks++;
    if (s_busy) begin
      failures++;
      $display("FAIL serial engine restarted by a start while busy");
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    angles.push_back(0);
    angles.push_back(cordic_tb_pkg::deg_to_q(30.0, FRAC));
    angles.push_back(cordic_tb_pkg::deg_to_q(45.0, FRAC));
    angles.push_back(cordic_tb_pkg::deg_to_q(60.0, FRAC));
    angles.push_back(cordic_tb_pkg::deg_to_q(-45.0, FRAC));
    angles.push_back(cordic_tb_pkg::deg_to_q(100.0, FRAC));
    for (int n = 0; n < N_RANDOM; n++)
      angles.push_back(cordic_tb_pkg::deg_to_q(-99.0 + 213.0 * real'($urandom_range(0, 100000)) / 100000.0, FRAC));
    foreach (angles[i]) begin
      to_send.push_back(angles[i]);
      if (i % 13 == 12) to_send.push_back(GAP);
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    foreach (angles[i]) serial_run(angles[i], i % 7 == 1);
    wait (to_send.size() == 0 && p_q.size() == 0);
    repeat (2) @(posedge clk);

    // the two engines compute the same function
    foreach (angles[i]) begin
      checks++;
      if (!p_sin_res.exists(angles[i])) begin
        failures++;
        $display("FAIL no pipelined result for %h", angles[i]);
      end else if (p_sin_res[angles[i]] - s_sin_of(angles[i]) > 4 || s_sin_of(angles[i]) - p_sin_res[angles[i]] > 4) begin
        failures++;
      end
    end

    $display("mechanisms exercised:");
    need("pipelined results on consecutive clocks", n_b2b);
    need("bubbles in the pipelined stream", n_bubble);
    need("pipelined: (1,0) start, angle <= 45 deg", n_low_p);
    need("pipelined: (0,1) start, angle > 45 deg", n_high_p);
    need("serial: (1,0) start, angle <= 45 deg", n_low_s);
    need("serial: (0,1) start, angle > 45 deg", n_high_s);
    need("serial: start while busy ignored", n_ignored);
    need("anticlockwise micro-rotations", n_ccw);
    need("clockwise micro-rotations", n_cw);
    checks++;
    if (n_p != angles.size() || n_s != angles.size()) begin
      failures++;
      $display("FAIL result counts pipelined %0d serial %0d of %0d", n_p, n_s, angles.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial results are recorded as they arrive, for the cross-check.
  logic signed [DW-1:0] s_sin_res[longint];
  longint s_cur;
  always @(posedge clk) if (s_start && !s_busy) s_cur = longint'(s_angle);
  always @(posedge clk) if (s_done) s_sin_res[s_cur] = s_sin;

  function automatic logic signed [DW-1:0] s_sin_of(input longint a);
    return s_sin_res.exists(a) ? s_sin_res[a] : '0;
  endfunction
endmodule
