// tb_zigzag_reorder: sends random 8x8 blocks as rows with random gaps and
// back-pressure and checks that each block comes out as 64 values in the
// standard zig-zag scan order (the scan table is written out here), with the
// right scan positions and 'last' on the 64th value.
module tb_zigzag_reorder;
  import dct_pkg::*;

  localparam int NB = 40;
  int checks = 0, failures = 0, n_stall = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic signed [14:0] in_coef [8], out_coef;
  logic [5:0] out_idx;

  zigzag_reorder dut (.clk, .rst_n, .in_valid, .in_ready, .in_coef, .out_valid, .out_ready,
                      .out_idx, .out_coef, .out_last);

  always #5 clk = ~clk;

  int zz [64] = '{ 0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
                  12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
                  35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
                  58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  int blk [NB][64];
  int ob = 0, on = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (int'(out_coef) != blk[ob][zz[on]] || out_idx != 6'(on) || out_last != (on == 63)) begin
        failures++;
        $display("block %0d scan %0d: got %0d (idx %0d last %0d) expected %0d", ob, on, out_coef,
                 out_idx, out_last, blk[ob][zz[on]]);
      end
      on++;
      if (on == 64) begin on = 0; ob++; end
    end
    if (out_valid && !out_ready) n_stall++;
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < 64; a++) blk[b][a] = int'($urandom_range(0, 32767)) - 16384;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++) begin
        while ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
        for (int k = 0; k < 8; k++) in_coef[k] <= 15'(blk[b][r * 8 + k]);
        in_valid <= 1;
        do @(posedge clk); while (!in_ready);
      end
    in_valid <= 0;
    while (ob < NB) @(posedge clk);
    checks++;
    if (n_stall == 0) begin failures++; $display("no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
