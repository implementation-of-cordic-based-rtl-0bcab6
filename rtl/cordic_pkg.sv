// cordic_pkg: constants shared by the CORDIC sine/cosine processor.
//
// All angles are in radians. The table ATAN_Q32 holds atan(2^-i) for
// i = 0..31 scaled by 2^32 and rounded to the nearest integer; K_Q32 holds
// the CORDIC gain compensation K = prod_i 1/sqrt(1 + 2^-2i) = 0.6072529350
// scaled the same way. Blocks round these to the number of fraction bits
// their datapath uses with the functions below, so one table serves every
// width. PI_2_Q32 and PI_4_Q32 are pi/2 and pi/4 at the same scale.
//
// The external number format (signed, 24 bits, 22 fraction bits, i.e. two
// integer/sign bits) follows the processor's published examples, e.g.
// 30 degrees = 0.5236 rad = 0x2182A4. The 32-bit master precision is a
// choice of this design.
package cordic_pkg;

  localparam int unsigned MAX_ITER = 32;

  localparam logic [63:0] ATAN_Q32 [MAX_ITER] = '{
    64'h00000000C90FDAA2, 64'h0000000076B19C16, 64'h000000003EB6EBF2, 64'h000000001FD5BA9B,
    64'h000000000FFAADDC, 64'h0000000007FF556F, 64'h0000000003FFEAAB, 64'h0000000001FFFD55,
    64'h0000000000FFFFAB, 64'h00000000007FFFF5, 64'h00000000003FFFFF, 64'h0000000000200000,
    64'h0000000000100000, 64'h0000000000080000, 64'h0000000000040000, 64'h0000000000020000,
    64'h0000000000010000, 64'h0000000000008000, 64'h0000000000004000, 64'h0000000000002000,
    64'h0000000000001000, 64'h0000000000000800, 64'h0000000000000400, 64'h0000000000000200,
    64'h0000000000000100, 64'h0000000000000080, 64'h0000000000000040, 64'h0000000000000020,
    64'h0000000000000010, 64'h0000000000000008, 64'h0000000000000004, 64'h0000000000000002
  };

  localparam logic [63:0] K_Q32    = 64'h000000009B74EDA8;
  localparam logic [63:0] PI_4_Q32 = 64'h00000000C90FDAA2;
  localparam logic [63:0] PI_2_Q32 = 64'h00000001921FB544;

  // Round a value held with 32 fraction bits to f fraction bits (f <= 32).
  function automatic logic [63:0] q32_to(input logic [63:0] v, input int unsigned f);
    logic [63:0] half;
    if (f >= 32) return v;
    half = 64'd1 << (31 - f);
    return (v + half) >> (32 - f);
  endfunction

  // atan(2^-i) with f fraction bits; 0 beyond the table.
  function automatic logic [63:0] atan_q(input int unsigned i, input int unsigned f);
    if (i >= MAX_ITER) return 64'd0;
    return q32_to(ATAN_Q32[i], f);
  endfunction

endpackage
