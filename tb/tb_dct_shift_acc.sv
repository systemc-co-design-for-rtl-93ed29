// tb_dct_shift_acc: feeds random 15-bit ROM words through full 16-plane runs
// and checks the final buffer against the value computed here:
//   acc = -w_0 * 2^15 + sum_{j=1..15} w_j * 2^(15-j)   (w_0 is the sign plane)
//   out = saturate15(floor((acc + 2^(s-1)) / 2^s))
// Includes runs with large words and small shifts so that both saturation
// limits are reached, and checks the buffer holds between loads.
module tb_dct_shift_acc;
  import dct_pkg::*;

  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  logic clk = 0, rst_n = 0, acc_en = 0, first = 0, load_out = 0;
  logic signed [14:0] rom_data = '0;
  logic [4:0] out_shift = 5'd12;
  logic signed [14:0] final_data;

  dct_shift_acc dut (.clk, .rst_n, .acc_en, .first, .rom_data, .load_out, .out_shift, .final_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int s, input bit big);
    longint acc, r, e;
    int w;
    acc = 0;
    out_shift <= 5'(s);
    for (int j = 0; j < 16; j++) begin
      if (big) w = ($urandom_range(0, 1) != 0) ? 16383 : -16384;
      else     w = int'($urandom_range(0, 10000)) - 5000;
      rom_data <= 15'(w);
      acc_en   <= 1;
      first    <= (j == 0);
      acc = (j == 0) ? -longint'(w) : 2 * acc + w;
      @(posedge clk);
    end
    acc_en <= 0;
    first  <= 0;
    @(posedge clk);
    load_out <= 1;
    @(posedge clk);
    load_out <= 0;
    r = (acc + (longint'(1) << (s - 1))) >>> s;
    e = r;
    if (r > 16383) begin e = 16383; sat_hi++; end
    if (r < -16384) begin e = -16384; sat_lo++; end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (longint'(final_data) != e) begin
      failures++;
      $display("shift %0d: got %0d expected %0d (acc %0d)", s, final_data, e, acc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 60; t++) run($urandom_range(9, 20), 0);
    for (int t = 0; t < 40; t++) run($urandom_range(2, 8), 1);
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("saturation not exercised: hi %0d lo %0d", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
