// cordic_tb_pkg: reference arithmetic for the CORDIC testbenches.
//
// Works in floating point, independently of the fixed-point datapath:
// converts degrees to the processor's angle format (radians * 2^frac,
// truncated toward zero as in the processor's published examples) and gives
// the exact sine and cosine of an encoded angle in the same format.
package cordic_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint deg_to_q(input real deg, input int frac);
    return longint'($rtoi(deg * PI / 180.0 * (2.0 ** frac)));
  endfunction

  function automatic real q_to_real(input longint q, input int frac);
    return real'(q) / (2.0 ** frac);
  endfunction

  function automatic real sin_q(input longint angle_q, input int frac);
    return $sin(q_to_real(angle_q, frac)) * (2.0 ** frac);
  endfunction

  function automatic real cos_q(input longint angle_q, input int frac);
    return $cos(q_to_real(angle_q, frac)) * (2.0 ** frac);
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
