// tb_dct2d: end-to-end test of the 8x8 2D DCT at its default parameters.
//
// A 256x256 8-bit test image (smooth gradients, random texture, flat black and
// white blocks, checkerboards) is cut into 32x32 macroblocks of 8x8 and streamed
// in raster order, one pixel row per transfer. For every block the coefficient
// rows are checked two ways:
//  * bit-exactly against a model computed here: integer coefficients
//    round(2^12 C(x)/2 cos((2i+1)x pi/16)) taken from the cosine, row pass
//    rounded to 3 fraction bits, column pass rounded to integers;
//  * against the real-valued 2D DCT, |error| <= 2.
// Block 0 runs without stalls and its timing is checked (first output row 336
// cycles after the first row transfer, block_done after 344). Later blocks get
// random input gaps and output back-pressure. The test counts each mechanism
// (row pass, column pass, input stall, output stall, negative coefficients,
// block completion) and fails if one never happened.
module tb_dct2d;
  import dct_pkg::*;

  localparam int IMG    = 256;
  localparam int NBLK   = (IMG / 8) * (IMG / 8);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, block_done;
  logic [7:0] in_pix [8];
  logic [2:0] out_row;
  logic signed [14:0] out_coef [8];

  dct2d dut (.clk, .rst_n, .in_valid, .in_ready, .in_pix, .out_valid, .out_ready,
             .out_row, .out_coef, .block_done);

  always #5 clk = ~clk;

  logic [7:0] img [IMG][IMG];
  longint     cyc = 0;
  real        max_err = 0.0;
  int n_row_pass = 0, n_col_pass = 0, n_in_stall = 0, n_out_stall = 0, n_neg = 0, n_done = 0;

  initial begin
    repeat (NBLK * 600 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- image
  initial begin
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int b, v;
        b = (y / 8) * (IMG / 8) + (x / 8);
        case (b % 7)
          0: v = (x + 2 * y) / 3;                                   // gradient
          1: v = $urandom_range(0, 255);                            // texture
          2: v = 255;                                               // white
          3: v = 0;                                                 // black
          4: v = ((x + y) % 2 != 0) ? 255 : 0;                      // checkerboard
          5: v = 128 + $rtoi(100.0 * $sin(x * 0.4) * $cos(y * 0.3)); // waves
          default: v = (x * y + $urandom_range(0, 31)) % 256;
        endcase
        img[y][x] = 8'(v);
      end
  end

  // ------------------------------------------------------------ reference
  function automatic real cosc(int i, int x);
    real c;
    c = (x == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return (c / 2.0) * $cos((2 * i + 1) * x * 3.14159265358979 / 16.0);
  endfunction

  function automatic longint rnd_sat(longint acc, int s);
    longint r;
    r = (acc + (longint'(1) << (s - 1))) >>> s;
    if (r > 16383)  r = 16383;
    if (r < -16384) r = -16384;
    return r;
  endfunction

  longint kint [8][8];
  real    creal [8][8];
  initial
    for (int i = 0; i < 8; i++)
      for (int x = 0; x < 8; x++) begin
        creal[i][x] = cosc(i, x);
        kint[i][x]  = longint'($rtoi($floor(2.0 * cosc(i, x) * 2048.0 + 0.5)));
      end

  longint exp_q  [8][8];
  real    exp_r  [8][8];

  task automatic make_ref(input int b);
    longint mid [8][8];
    real    rmid [8][8];
    int     by, bx;
    by = (b / (IMG / 8)) * 8;
    bx = (b % (IMG / 8)) * 8;
    for (int i = 0; i < 8; i++)
      for (int y = 0; y < 8; y++) begin
        longint acc;
        real    ra;
        acc = 0; ra = 0.0;
        for (int j = 0; j < 8; j++) begin
          acc += kint[j][y] * longint'(img[by + i][bx + j]);
          ra  += creal[j][y] * real'(img[by + i][bx + j]);
        end
        mid[i][y]  = rnd_sat(acc, 12 - 3);
        rmid[i][y] = ra;
      end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        longint acc;
        real    ra;
        acc = 0; ra = 0.0;
        for (int i = 0; i < 8; i++) begin
          acc += kint[i][x] * mid[i][y];
          ra  += creal[i][x] * rmid[i][y];
        end
        exp_q[x][y] = rnd_sat(acc, 12 + 3);
        exp_r[x][y] = ra;
      end
  endtask

  // --------------------------------------------------------------- driver
  int  in_blk = 0, in_r = 0;
  bit  stalls_on = 0;
  longint t_first_in = -1, t_first_out = -1, t_first_done = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      in_valid <= 0;
    end else begin
      int nb, nr;
      nb = in_blk; nr = in_r;
      if (in_valid && in_ready) begin
        n_row_pass++;
        if (t_first_in < 0) t_first_in = cyc;
        nr++;
        if (nr == 8) begin nr = 0; nb++; end
      end
      in_blk <= nb; in_r <= nr;
      in_valid <= (nb < NBLK) && !(stalls_on && $urandom_range(0, 3) == 0);
      for (int k = 0; k < 8; k++)
        in_pix[k] <= (nb < NBLK) ? img[(nb / (IMG / 8)) * 8 + nr][(nb % (IMG / 8)) * 8 + k] : 8'h0;
      if (in_ready && !in_valid) n_in_stall += stalls_on ? 1 : 0;
    end
  end

  // -------------------------------------------------------------- checker
  int out_blk = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      out_ready <= 0;
    end else begin
      if (out_valid && t_first_out < 0) t_first_out = cyc;
      if (block_done) begin
        n_done++;
        if (t_first_done < 0) t_first_done = cyc;
      end
      if (dut.ram_we && dut.ram_wr_col) n_col_pass++;
      if (out_valid && !out_ready) n_out_stall++;
      if (out_valid && out_ready) begin
        if (out_row == 3'd0) make_ref(out_blk);
        for (int k = 0; k < 8; k++) begin
          real e;
          checks++;
          if (longint'(out_coef[k]) != exp_q[out_row][k]) begin
            failures++;
            if (failures < 20)
              $display("block %0d F(%0d,%0d): got %0d expected %0d", out_blk, out_row, k,
                       out_coef[k], exp_q[out_row][k]);
          end
          e = real'(out_coef[k]) - exp_r[out_row][k];
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > 2.0) begin
            failures++;
            $display("block %0d F(%0d,%0d): got %0d, real DCT %f", out_blk, out_row, k,
                     out_coef[k], exp_r[out_row][k]);
          end
          if (out_coef[k] < 0) n_neg++;
        end
        if (out_row == 3'd7) begin
          out_blk++;
          stalls_on <= 1;
          if (out_blk == NBLK) finish_test();
        end
      end
      out_ready <= !(stalls_on && $urandom_range(0, 2) == 0);
    end
  end

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  task automatic finish_test();
    checks++;
    if (t_first_out - t_first_in != 336) begin
      failures++;
      $display("first output row after %0d cycles, expected 336", t_first_out - t_first_in);
    end
    checks++;
    if (t_first_done - t_first_in != 344) begin
      failures++;
      $display("first block_done after %0d cycles, expected 344", t_first_done - t_first_in);
    end
    expect_count("row pass", n_row_pass);
    expect_count("column pass", n_col_pass);
    expect_count("input stall", n_in_stall);
    expect_count("output stall", n_out_stall);
    expect_count("negative coefficient", n_neg);
    expect_count("block done", n_done);
    checks++;
    if (n_row_pass != NBLK * 8 || n_col_pass != NBLK * 8) begin
      failures++;
      $display("row passes %0d, column passes %0d, expected %0d each", n_row_pass, n_col_pass, NBLK * 8);
    end
    $display("blocks %0d, row passes %0d, column passes %0d, input stalls %0d, output stalls %0d, negative coefs %0d, max |err| vs real DCT %f, cycles %0d",
             out_blk, n_row_pass, n_col_pass, n_in_stall, n_out_stall, n_neg, max_err, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end
endmodule
