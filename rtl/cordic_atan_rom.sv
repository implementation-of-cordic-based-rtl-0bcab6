// cordic_atan_rom: lookup table of the CORDIC elementary rotation angles.
//
// Entry i is atan(2^-i) in radians with F fraction bits, rounded to nearest
// (entry 0 is 45 degrees, entry 1 is 26.57 degrees, and so on). The table
// has one entry per iteration, as the algorithm prescribes: 2^SW entries,
// with entries beyond 31 equal to zero. The values are computed at
// elaboration from the 32-fraction-bit master table in cordic_pkg, so the
// ROM follows any change of the datapath width. The rounding and the width
// are choices of this design.
//
// Interface: idx selects the entry; atan_o is purely combinational (no clock).
module cordic_atan_rom #(
  parameter int unsigned W  = 28,   // width of an entry (two's complement)
  parameter int unsigned F  = 25,   // fraction bits of an entry
  parameter int unsigned SW = 5     // width of the index
) (
  input  logic [SW-1:0] idx,
  output logic [W-1:0]  atan_o
);
  import cordic_pkg::*;

  localparam int unsigned DEPTH = 1 << SW;

  typedef logic [W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < DEPTH; i++) r[i] = W'(atan_q(i, F));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign atan_o = ROM[idx];

endmodule
