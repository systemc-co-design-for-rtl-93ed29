// tb_image_codec: end-to-end test of the image encoder and decoder at their
// default parameters, on a full 256x256 8-bit image (1024 macroblocks of 8x8).
//
// The encoder's bit stream is looped back into the decoder through a queue,
// with random gaps and back-pressure on every interface. Checks, all bit-exact
// against a model computed here from the cosine (integer coefficients
// round(2^12 C(x)/2 cos((2i+1)x pi/16)), row pass to 3 fraction bits, column
// pass to integers):
//  * every bit of the encoder output, against the quantised coefficients in
//    zig-zag order coded by a run-length / Huffman coder written here from the
//    code tables (JPEG luminance tables);
//  * every decoded pixel: dequantised block, inverse DCT, clamp to 0..255.
// Halfway through, once the pipeline is empty, the quantisation table is
// rewritten (all steps 2) and the rest of the image is coded with it. The test
// counts each mechanism (input and output stalls on both sides, zero and
// non-zero quantised values, ZRL and EOB codes, pixel clamping, table rewrite,
// block completions)
// and fails if one never happened. It also reports the reconstruction PSNR.
// The video adder/subtractor beside the codec is driven with residuals of the
// image against a shifted copy of itself and with the matching rebuilds.
module tb_image_codec;
  import dct_pkg::*;

  localparam int IMG  = 256;
  localparam int BPR  = IMG / 8;          // blocks per block-row
  localparam int NBLK = BPR * BPR;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [5:0] tbl_addr = '0;
  logic [7:0] tbl_data = '0;
  logic enc_in_valid = 0, enc_in_ready, enc_out_valid, enc_out_ready = 0, enc_out_bit;
  logic enc_block_done, dec_in_valid = 0, dec_in_ready, dec_out_valid, dec_out_ready = 0;
  logic dec_block_done;
  logic [7:0] enc_in_pix [8], dec_out_pix [8];
  logic [2:0] dec_out_row;
  logic dec_in_bit = 0;
  logic vid_valid = 0, vid_mode_add = 0, vid_out_valid;
  logic signed [8:0] vid_a [8], vid_y [8];
  logic [7:0] vid_pred [8];

  image_codec dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ test image
  logic [7:0] img [IMG][IMG];
  initial begin
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int b, v;
        b = (y / 8) * BPR + (x / 8);
        case (b % 6)
          0: v = (x + 2 * y) / 3;
          1: v = 128 + $rtoi(100.0 * $sin(x * 0.2) * $cos(y * 0.15));
          2: v = $urandom_range(0, 255);
          3: v = ((x / 2 + y / 2) % 2 != 0) ? 255 : 0;
          4: v = 60 + $urandom_range(0, 15);
          default: v = (x * y) % 256;
        endcase
        img[y][x] = 8'(v);
      end
  end

  // ----------------------------------------------------------------- model
  int qt_default [64] = '{16, 11, 10, 16, 24, 40, 51, 61, 12, 12, 14, 19, 26, 58, 60, 55,
                          14, 13, 16, 24, 40, 57, 69, 56, 14, 17, 22, 29, 51, 87, 80, 62,
                          18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
                          49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};
  int zz [64] = '{ 0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
                  12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
                  35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
                  58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  localparam int QT_NEW = 2;
  localparam int SWITCH_BLK = NBLK / 2;

  longint kint [8][8];

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

  int exp_q   [NBLK][64];   // quantised coefficients, raster order
  int exp_pix [NBLK][64];   // decoded pixels, raster order
  int n_clamp = 0, n_zero = 0, n_nonzero = 0;

  task automatic model_block(input int b);
    longint f [8][8], mid [8][8], c [8][8], d [8][8];
    int by, bx;
    by = (b / BPR) * 8;
    bx = (b % BPR) * 8;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) f[i][j] = img[by + i][bx + j];
    // forward: rows then columns
    for (int i = 0; i < 8; i++)
      for (int y = 0; y < 8; y++) begin
        longint acc; acc = 0;
        for (int j = 0; j < 8; j++) acc += kint[j][y] * f[i][j];
        mid[i][y] = rnd_sat(acc, 9);
      end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        longint acc; acc = 0;
        for (int i = 0; i < 8; i++) acc += kint[i][x] * mid[i][y];
        c[x][y] = rnd_sat(acc, 15);
      end
    // quantise and dequantise
    for (int a = 0; a < 64; a++) begin
      longint m, q, s;
      s = (b < SWITCH_BLK) ? qt_default[a] : QT_NEW;
      m = c[a / 8][a % 8];
      q = ((m < 0 ? -m : m) + s / 2) / s;
      if (m < 0) q = -q;
      exp_q[b][a] = int'(q);
      if (q == 0) n_zero++; else n_nonzero++;
      q = q * s;
      if (q > 16383) q = 16383;
      if (q < -16384) q = -16384;
      d[a / 8][a % 8] = q;
    end
    // inverse: rows then columns
    for (int x = 0; x < 8; x++)
      for (int j = 0; j < 8; j++) begin
        longint acc; acc = 0;
        for (int y = 0; y < 8; y++) acc += kint[j][y] * d[x][y];
        mid[x][j] = rnd_sat(acc, 9);
      end
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        longint acc, p; acc = 0;
        for (int x = 0; x < 8; x++) acc += kint[i][x] * mid[x][j];
        p = rnd_sat(acc, 15);
        if (p < 0 || p > 255) n_clamp++;
        if (p < 0) p = 0;
        if (p > 255) p = 255;
        exp_pix[b][i * 8 + j] = int'(p);
      end
  endtask

  int n_zrl = 0, n_eob = 0, n_noeob = 0, n_hclamp = 0;
  // ------------------------------------------- run-length / Huffman model
  int dc_code [12], dc_len [12];
  int ac_code [256], ac_len [256];

  task automatic build(input logic [7:0] bits [HUFF_LEN], input int nsym, input bit dc);
    int code, k, s;
    code = 0;
    k    = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int j = 0; j < int'(bits[l-1]); j++) begin
        s = dc ? int'(DC_VALS[k]) : int'(AC_VALS[k]);
        if (dc) begin dc_code[s] = code; dc_len[s] = l; end
        else    begin ac_code[s] = code; ac_len[s] = l; end
        code++; k++;
      end
      code = code << 1;
    end
    if (k != nsym) begin failures++; $display("FAIL table symbol count %0d", k); end
    checks++;
  endtask

  task automatic expect_code(input string name, input int code, input int len,
                             input int want_code, input int want_len);
    checks++;
    if (code != want_code || len != want_len) begin
      failures++;
      $display("FAIL %s code %0h/%0d, want %0h/%0d", name, code, len, want_code, want_len);
    end
  endtask

  // ---- reference encoder ---------------------------------------------------
  bit exp_bits [$];

  function automatic void put(int code, int len);
    for (int b = len - 1; b >= 0; b--) exp_bits.push_back(bit'((code >> b) & 1));
  endfunction

  function automatic int size_of(int v);
    int m = (v < 0) ? -v : v, s = 0;
    while (m != 0) begin s++; m = m >> 1; end
    return s;
  endfunction

  function automatic int amp_of(int v, int s);
    return ((v < 0) ? v - 1 : v) & ((1 << s) - 1);
  endfunction

  function automatic void encode(int blk [64]);
    int run = 0, v, s;
    for (int p = 0; p < 64; p++) begin
      v = blk[p];
      if (p == 0) begin
        if (v > 2047) begin v = 2047; n_hclamp++; end
        if (v < -2047) begin v = -2047; n_hclamp++; end
        s = size_of(v);
        put(dc_code[s], dc_len[s]);
        put(amp_of(v, s), s);
      end else if (v == 0) begin
        run++;
      end else begin
        if (v > 1023) begin v = 1023; n_hclamp++; end
        if (v < -1023) begin v = -1023; n_hclamp++; end
                while (run >= 16) begin put(ac_code[8'hF0], ac_len[8'hF0]); run -= 16; n_zrl++; end
        s = size_of(v);
        put(ac_code[run * 16 + s], ac_len[run * 16 + s]);
        put(amp_of(v, s), s);
        run = 0;
      end
    end
    if (run > 0) begin put(ac_code[8'h00], ac_len[8'h00]); n_eob++; end
    else n_noeob++;
  endfunction

  bit model_ready = 0;
  int zblk [64];
  int blk_end [NBLK];          // bit count at the end of each block
  initial begin
    #1;
    for (int i = 0; i < 8; i++)
      for (int x = 0; x < 8; x++) kint[i][x] = longint'($rtoi($floor(2.0 * cosc(i, x) * 2048.0 + 0.5)));
    for (int b = 0; b < NBLK; b++) model_block(b);
    build(DC_BITS, DC_NSYM, 1'b1);
    build(AC_BITS, AC_NSYM, 1'b0);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 64; n++) zblk[n] = exp_q[b][zz[n]];
      encode(zblk);
      blk_end[b] = exp_bits.size();
    end
    $display("model: %0d bits for %0d blocks", exp_bits.size(), NBLK);
    model_ready = 1;
  end

  // ------------------------------------------------------------- watchdog
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (NBLK * 3000 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- encoder input
  int n_enc_in_stall = 0, n_enc_out_stall = 0, n_dec_in_gap = 0, n_dec_out_stall = 0;
  int n_table_write = 0, n_enc_done = 0, n_dec_done = 0, dec_blk = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (model_ready);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b == SWITCH_BLK) begin
        enc_in_valid <= 0;
        while (dec_blk < SWITCH_BLK) @(posedge clk);
        for (int a = 0; a < 64; a++) begin
          tbl_we   <= 1;
          tbl_addr <= 6'(a);
          tbl_data <= 8'(QT_NEW);
          @(posedge clk);
          n_table_write++;
        end
        tbl_we <= 0;
      end
      for (int r = 0; r < 8; r++) begin
        if ($urandom_range(0, 3) == 0) begin
          enc_in_valid <= 0;
          do @(posedge clk); while (!enc_in_ready);
          repeat ($urandom_range(1, 3)) begin @(posedge clk); n_enc_in_stall++; end
        end
        for (int k = 0; k < 8; k++) enc_in_pix[k] <= img[(b / BPR) * 8 + r][(b % BPR) * 8 + k];
        enc_in_valid <= 1;
        do @(posedge clk); while (!enc_in_ready);
      end
    end
    enc_in_valid <= 0;
  end

  // ------------------------------------- encoder output, loop-back, decoder input
  bit b_loop [$];
  int enc_blk = 0, enc_bits = 0;
  always @(posedge clk) begin
    if (enc_out_valid && enc_out_ready) begin
      checks++;
      if (enc_bits >= exp_bits.size() || enc_out_bit != exp_bits[enc_bits]) begin
        failures++;
        if (failures < 20) $display("encoder bit %0d: got %0b", enc_bits, enc_out_bit);
      end
      b_loop.push_back(enc_out_bit);
      enc_bits++;
      while (enc_blk < NBLK && enc_bits >= blk_end[enc_blk]) enc_blk++;
    end
    if (enc_out_valid && !enc_out_ready) n_enc_out_stall++;
    enc_out_ready <= ($urandom_range(0, 4) != 0);

    if (dec_in_valid && dec_in_ready) void'(b_loop.pop_front());
    if (b_loop.size() > 0) begin
      if ($urandom_range(0, 4) == 0) begin
        dec_in_valid <= 0;
        n_dec_in_gap++;
      end else begin
        dec_in_valid <= 1;
        dec_in_bit   <= b_loop[0];
      end
    end else
      dec_in_valid <= 0;

    if (enc_block_done) n_enc_done++;
    if (dec_block_done) n_dec_done++;
  end

  // ------------------------------------------- video adder/subtractor path
  // Residuals of the current image against a shifted copy of itself as the
  // prediction (subtract), and the rebuilt pixels (add), checked a cycle later.
  // Inputs set at one edge are sampled at the next and checked at the one after.
  int n_vid_sub = 0, n_vid_add = 0, vid_exp1 [8], vid_exp2 [8], vy = 0;
  bit vid_v1 = 0, vid_v2 = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (vid_out_valid != vid_v2) begin failures++; $display("video valid mismatch"); end
      if (vid_v2)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(vid_y[k]) != vid_exp2[k]) begin
            failures++;
            $display("video k %0d: got %0d expected %0d", k, vid_y[k], vid_exp2[k]);
          end
        end
      vid_v2   = vid_v1;
      vid_exp2 = vid_exp1;
      vid_v1   = (cyc % 97 < 40);
      if (vid_v1) begin
        bit m;
        m = (cyc % 2 == 1);
        for (int k = 0; k < 8; k++) begin
          int cur, pr;
          cur = img[vy % IMG][(8 * k + vy) % IMG];
          pr  = img[(vy + 1) % IMG][(8 * k + vy + 3) % IMG];
          vid_a[k]     <= 9'(m ? cur - pr : cur);
          vid_pred[k]  <= 8'(pr);
          vid_exp1[k]  = m ? cur : cur - pr;
        end
        if (m) n_vid_add++; else n_vid_sub++;
        vid_mode_add <= m;
        vy++;
      end
      vid_valid <= vid_v1;
    end
  end

  // -------------------------------------------------------- decoder output
  real sq_err = 0.0;
  always @(posedge clk) begin
    if (dec_out_valid && dec_out_ready) begin
      for (int k = 0; k < 8; k++) begin
        int orig;
        checks++;
        if (int'(dec_out_pix[k]) != exp_pix[dec_blk][dec_out_row * 8 + k]) begin
          failures++;
          if (failures < 20)
            $display("decoder block %0d (%0d,%0d): got %0d expected %0d", dec_blk, dec_out_row, k,
                     dec_out_pix[k], exp_pix[dec_blk][dec_out_row * 8 + k]);
        end
        orig = img[(dec_blk / BPR) * 8 + dec_out_row][(dec_blk % BPR) * 8 + k];
        sq_err += real'((int'(dec_out_pix[k]) - orig) * (int'(dec_out_pix[k]) - orig));
      end
      if (dec_out_row == 3'd7) begin
        dec_blk++;
        if (dec_blk == NBLK) finish_test();
      end
    end
    if (dec_out_valid && !dec_out_ready) n_dec_out_stall++;
    dec_out_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  task automatic finish_test();
    real mse;
    mse = sq_err / real'(IMG * IMG);
    expect_count("encoder input stall", n_enc_in_stall);
    expect_count("encoder output back-pressure", n_enc_out_stall);
    expect_count("decoder input gap", n_dec_in_gap);
    expect_count("decoder output back-pressure", n_dec_out_stall);
    expect_count("quantised to zero", n_zero);
    expect_count("quantised non-zero", n_nonzero);
    expect_count("decoded pixel clamped", n_clamp);
    expect_count("ZRL code", n_zrl);
    expect_count("EOB code", n_eob);
    expect_count("block ending on a non-zero value", n_noeob);
    expect_count("quantisation table rewrite", n_table_write);
    expect_count("video subtract", n_vid_sub);
    expect_count("video add", n_vid_add);
    checks++;
    if (n_enc_done != NBLK || enc_blk != NBLK || enc_bits != exp_bits.size()) begin
      failures++;
      $display("encoder blocks done %0d, streamed %0d, expected %0d; bits %0d of %0d",
               n_enc_done, enc_blk, NBLK, enc_bits, exp_bits.size());
    end
    $display("blocks %0d, cycles %0d, zero/non-zero quantised %0d/%0d, clamped pixels %0d",
             dec_blk, cyc, n_zero, n_nonzero, n_clamp);
    $display("coded bits %0d (%0.3f bit/pixel), ZRL %0d, EOB %0d, clamped for the tables %0d",
             enc_bits, real'(enc_bits) / real'(IMG * IMG), n_zrl, n_eob, n_hclamp);
    $display("stalls: enc in %0d, enc out %0d, dec in %0d, dec out %0d; table writes %0d",
             n_enc_in_stall, n_enc_out_stall, n_dec_in_gap, n_dec_out_stall, n_table_write);
    $display("reconstruction PSNR %0.2f dB", 10.0 * $log10(255.0 * 255.0 / (mse > 0.0 ? mse : 1e-9)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
