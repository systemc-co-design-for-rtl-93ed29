// tb_idct2d: checks the 8x8 inverse DCT.
// Blocks: DCT coefficients (real-valued, rounded) of random and smooth 8x8
// pixel blocks, and blocks of large random coefficients that drive the output
// beyond the pixel range. Every output pixel is compared bit-exactly with a
// model computed here (integer coefficients from the cosine, row pass rounded
// to 3 fraction bits, column pass to integers, clamp to 0..255), and for the
// pixel-derived blocks with the original pixel, |error| <= 2. Random input
// gaps and output back-pressure; the unstalled first block's timing is checked.
module tb_idct2d;
  import dct_pkg::*;

  localparam int NB = 60;
  int checks = 0, failures = 0, n_clamp = 0, n_in_stall = 0, n_out_stall = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, block_done;
  logic signed [14:0] in_coef [8];
  logic [2:0] out_row;
  logic [7:0] out_pix [8];

  idct2d dut (.clk, .rst_n, .in_valid, .in_ready, .in_coef, .out_valid, .out_ready, .out_row,
              .out_pix, .block_done);

  always #5 clk = ~clk;

  int pix  [NB][8][8];
  int coef [NB][8][8];
  bit from_pixels [NB];
  longint cyc = 0, t_in0 = -1, t_out0 = -1;
  bit stalls_on = 0;
  real max_err = 0.0;

  initial begin
    repeat (NB * 800 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cosc(int i, int x);
    real c;
    c = (x == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return (c / 2.0) * $cos((2 * i + 1) * x * 3.14159265358979 / 16.0);
  endfunction

  function automatic longint kint(int i, int x);
    return longint'($rtoi($floor(2.0 * cosc(i, x) * 2048.0 + 0.5)));
  endfunction

  function automatic longint rnd_sat(longint acc, int s);
    longint r;
    r = (acc + (longint'(1) << (s - 1))) >>> s;
    if (r > 16383)  r = 16383;
    if (r < -16384) r = -16384;
    return r;
  endfunction

  longint expq [8][8];

  task automatic model(input int b);
    longint mid [8][8];
    for (int x = 0; x < 8; x++)
      for (int j = 0; j < 8; j++) begin
        longint acc;
        acc = 0;
        for (int y = 0; y < 8; y++) acc += kint(j, y) * coef[b][x][y];
        mid[x][j] = rnd_sat(acc, 9);
      end
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        longint acc;
        acc = 0;
        for (int x = 0; x < 8; x++) acc += kint(i, x) * mid[x][j];
        expq[i][j] = rnd_sat(acc, 15);
        if (expq[i][j] < 0 || expq[i][j] > 255) n_clamp++;
        if (expq[i][j] < 0) expq[i][j] = 0;
        if (expq[i][j] > 255) expq[i][j] = 255;
      end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      from_pixels[b] = (b % 4 != 3);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          pix[b][i][j] = (b % 2 == 0) ? $urandom_range(0, 255) : (i * 20 + j * 9 + b) % 256;
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          if (from_pixels[b]) begin
            real s;
            s = 0.0;
            for (int i = 0; i < 8; i++)
              for (int j = 0; j < 8; j++) s += cosc(i, x) * cosc(j, y) * pix[b][i][j];
            coef[b][x][y] = $rtoi($floor(s + 0.5));
          end else
            coef[b][x][y] = int'($urandom_range(0, 1200)) - 600;
        end
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  int ob = 0;
  always @(posedge clk) begin
    if (out_valid && t_out0 < 0) t_out0 = cyc;
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      if (out_row == 3'd0) model(ob);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (longint'(out_pix[k]) != expq[out_row][k]) begin
          failures++;
          if (failures < 20) $display("block %0d (%0d,%0d): got %0d expected %0d", ob, out_row, k,
                                      out_pix[k], expq[out_row][k]);
        end
        if (from_pixels[ob]) begin
          real e;
          e = real'(out_pix[k]) - real'(pix[ob][out_row][k]);
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > 2.0) begin
            failures++;
            $display("block %0d (%0d,%0d): got %0d original %0d", ob, out_row, k, out_pix[k],
                     pix[ob][out_row][k]);
          end
        end
      end
      if (out_row == 3'd7) begin ob++; stalls_on <= 1; end
    end
    out_ready <= !(stalls_on && $urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++) begin
        if (stalls_on && $urandom_range(0, 3) == 0) begin
          // hold the row back for a few cycles while the unit waits for it
          in_valid <= 0;
          do @(posedge clk); while (!in_ready);
          repeat ($urandom_range(1, 3)) begin
            @(posedge clk);
            n_in_stall++;
          end
        end
        for (int k = 0; k < 8; k++) in_coef[k] <= 15'(coef[b][r][k]);
        in_valid <= 1;
        do @(posedge clk); while (!in_ready);
        if (t_in0 < 0) t_in0 = cyc;
      end
    in_valid <= 0;
    while (ob < NB) @(posedge clk);
    checks++;
    if (t_out0 - t_in0 != 336) begin
      failures++;
      $display("first output after %0d cycles, expected 336", t_out0 - t_in0);
    end
    checks++;
    if (n_clamp == 0 || n_in_stall == 0 || n_out_stall == 0) begin
      failures++;
      $display("not exercised: clamps %0d input stalls %0d output stalls %0d", n_clamp, n_in_stall, n_out_stall);
    end
    $display("clamped pixels %0d, max |err| to original %f", n_clamp, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
