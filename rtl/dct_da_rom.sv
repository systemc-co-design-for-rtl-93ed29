// dct_da_rom: one distributed-arithmetic look-up table D_x of the 8-point DCT.
//
// For output index X the ROM holds, for each 4-bit address a, the partial sum
// D_X(a) = sum of C_(i,X) over the address bits a[i] that are set (i = 0..3).
// During a transform the address is one bit-plane of the four butterfly values
// (u_0..u_3 for even X, v_0..v_3 for odd X), so the ROM replaces the four
// multiplications of that bit-plane. There are eight such ROMs, one per X.
//
// Entries are signed 4.11 fixed point, 15 bits, and hold twice C_(i,X) as in
// the published ROM0 contents (0x0000, 0x05a8, 0x0b50, 0x10f8, 0x16a0). They
// are computed at elaboration from the coefficient table in dct_pkg.
//
// Timing: combinational, like a ROM process sensitive to its address only.
module dct_da_rom
  import dct_pkg::*;
#(
  parameter int unsigned X = 0        // DCT output index 0..7 served by this ROM
) (
  input  logic [HALF-1:0]           addr,  // bit i = current bit of u_i / v_i
  output logic signed [ROM_W-1:0]   data   // D_X(addr), 4.11
);

  logic signed [ROM_W-1:0] table_q [2**HALF];

  always_comb begin
    for (int a = 0; a < 2**HALF; a++)
      table_q[a] = rom_entry(X, HALF'(a));
  end

  assign data = table_q[addr];

  initial assert (X < N) else $error("dct_da_rom: X must be 0..7");

endmodule
