// tb_idct_da_rom: checks the eight inverse-DCT ROMs (even and odd parts of
// samples 0..3) over all 16 addresses against sums of coefficients worked out
// here from the cosine, each doubled and rounded to 11 fraction bits.
module tb_idct_da_rom;
  import dct_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic signed [14:0] data [4][2];

  for (genvar i = 0; i < 4; i++) begin : g
    for (genvar o = 0; o < 2; o++) begin : h
      idct_da_rom #(.I(i), .ODD(o)) dut (.addr(addr), .data(data[i][o]));
    end
  end

  function automatic int ref_coef(int i, int x);
    real c;
    c = (x == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return $rtoi($floor(c * $cos((2 * i + 1) * x * 3.14159265358979 / 16.0) * 2048.0 + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int i = 0; i < 4; i++)
        for (int o = 0; o < 2; o++) begin
          int exp_v;
          exp_v = 0;
          for (int k = 0; k < 4; k++) if (a[k]) exp_v += ref_coef(i, 2 * k + o);
          checks++;
          if (int'(data[i][o]) != exp_v) begin
            failures++;
            $display("ROM i=%0d odd=%0d addr %0d: got %0d expected %0d", i, o, a, data[i][o], exp_v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
