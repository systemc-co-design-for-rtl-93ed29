// idct_da_rom: one distributed-arithmetic look-up table of the 8-point inverse
// DCT.
//
// The inverse transform f_i = sum_x C_(i,x) F_x splits, by the same symmetry the
// forward transform uses, into an even part e_i over F_0, F_2, F_4, F_6 and an
// odd part o_i over F_1, F_3, F_5, F_7, with f_i = e_i + o_i and
// f_(7-i) = e_i - o_i for i = 0..3. This ROM serves e_I (ODD=0) or o_I (ODD=1):
// for a 4-bit address a it holds the sum of C_(I,2k+ODD) over the set bits a[k].
// Words are signed 4.11 holding twice the coefficient, exactly like the forward
// ROMs (dct_da_rom), and are computed at elaboration from dct_pkg.
//
// The source article names the inverse transform but does not give its structure;
// this mirror image of the forward distributed-arithmetic unit is this design's
// choice. Timing: combinational.
module idct_da_rom
  import dct_pkg::*;
#(
  parameter int unsigned I   = 0,     // output sample index 0..3
  parameter bit          ODD = 1'b0   // 0: even part e_I, 1: odd part o_I
) (
  input  logic [HALF-1:0]           addr,  // bit k = current bit of F_(2k+ODD)
  output logic signed [ROM_W-1:0]   data
);

  logic signed [ROM_W-1:0] table_q [2**HALF];

  always_comb begin
    for (int a = 0; a < 2**HALF; a++)
      table_q[a] = idct_rom_entry(I, ODD, HALF'(a));
  end

  assign data = table_q[addr];

  initial assert (I < HALF) else $error("idct_da_rom: I must be 0..3");

endmodule
