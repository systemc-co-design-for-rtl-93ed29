// tb_dct_da_rom: checks all eight DA ROMs over all 16 addresses.
// The expected entry is worked out here from the cosine definition
// C_(i,x) = C(x)/2 cos((2i+1) x pi/16), doubled and rounded to 11 fraction bits
// per coefficient, then summed over the set address bits. ROM 0 is also checked
// against the published ROM0 word list.
module tb_dct_da_rom;
  import dct_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic signed [14:0] data [8];

  for (genvar x = 0; x < 8; x++) begin : g
    dct_da_rom #(.X(x)) dut (.addr(addr), .data(data[x]));
  end

  function automatic int ref_coef(int i, int x);
    real c;
    c = (x == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return $rtoi($floor(2.0 * (c / 2.0) * $cos((2 * i + 1) * x * 3.14159265358979 / 16.0) * 2048.0 + 0.5));
  endfunction

  int rom0_pub [16] = '{'h0000, 'h05a8, 'h05a8, 'h0b50, 'h05a8, 'h0b50, 'h0b50, 'h10f8,
                        'h05a8, 'h0b50, 'h0b50, 'h10f8, 'h0b50, 'h10f8, 'h10f8, 'h16a0};

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
      for (int x = 0; x < 8; x++) begin
        int exp_v;
        exp_v = 0;
        for (int i = 0; i < 4; i++) if (a[i]) exp_v += ref_coef(i, x);
        checks++;
        if (int'(data[x]) != exp_v) begin
          failures++;
          $display("ROM%0d addr %0d: got %0d expected %0d", x, a, data[x], exp_v);
        end
      end
      checks++;
      if (int'(data[0]) != rom0_pub[a]) begin
        failures++;
        $display("ROM0 addr %0d: got %h expected published %h", a, data[0], rom0_pub[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
