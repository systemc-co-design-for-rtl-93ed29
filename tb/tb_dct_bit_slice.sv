// tb_dct_bit_slice: loads random 16-bit values and checks that every bit-plane
// appears on the address, sign bit first, one per shift, also across idle
// cycles in which nothing may change.
module tb_dct_bit_slice;
  import dct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic signed [15:0] din [4];
  logic [3:0] addr;

  dct_bit_slice dut (.clk, .rst_n, .load, .shift, .din, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] val [4];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 4; i++) begin
        val[i] = 16'($urandom);
        din[i] <= val[i];
      end
      load <= 1;
      @(posedge clk);
      load <= 0;
      for (int j = 15; j >= 0; j--) begin
        #1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (addr[i] !== val[i][j]) begin
            failures++;
            $display("test %0d plane %0d lane %0d: got %b expected %b", t, j, i, addr[i], val[i][j]);
          end
        end
        // sometimes hold for a cycle without shifting
        if ($urandom_range(0, 3) == 0) begin
          shift <= 0;
          @(posedge clk);
          #1;
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (addr[i] !== val[i][j]) failures++;
          end
        end
        shift <= 1;
        @(posedge clk);
        shift <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
