// tb_entropy_encoder: self-checking test of the run-length / Huffman coder.
//
// The testbench builds its own canonical codes from the code-length counts and
// symbol lists, and checks a few well-known codewords (DC size 0 = 00, EOB =
// 1010, ZRL = 11111111001). It then encodes each block itself, bit by bit, and
// compares every output bit of the coder. The block mix includes:
//   * sparse random blocks;
//   * all-zero blocks;
//   * blocks that end on a non-zero value (no EOB);
//   * zero runs of 16, 32 and 48 or more (ZRL);
//   * negative values;
//   * values beyond the table range, which must be clamped.
// Input gaps and output stalls are random. Each of these cases is counted, and
// a case that never happened is a failure.
module tb_entropy_encoder;
  import dct_pkg::*;

  localparam int NBLK = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic signed [WORD_W-1:0] in_coef = '0;
  logic                     out_valid, out_ready = 1'b0, out_bit;

  entropy_encoder dut (.*);

  int checks = 0, failures = 0;
  int n_zrl = 0, n_eob = 0, n_noeob = 0, n_clamp = 0, n_neg = 0, n_stall = 0;

  // ---- reference code tables --------------------------------------------
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
  bit exp_q [$];

  function automatic void put(int code, int len);
    for (int b = len - 1; b >= 0; b--) exp_q.push_back(bit'((code >> b) & 1));
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
        if (v > 2047) begin v = 2047; n_clamp++; end
        if (v < -2047) begin v = -2047; n_clamp++; end
        s = size_of(v);
        put(dc_code[s], dc_len[s]);
        put(amp_of(v, s), s);
      end else if (v == 0) begin
        run++;
      end else begin
        if (v > 1023) begin v = 1023; n_clamp++; end
        if (v < -1023) begin v = -1023; n_clamp++; end
        if (v < 0) n_neg++;
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

  // ---- stimulus ------------------------------------------------------------
  int blocks [NBLK][64];

  function automatic int rnd_val(int maxmag);
    int m = 1 + int'($urandom_range(0, maxmag - 1));
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  int kind;
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      kind = b % 8;
      for (int p = 0; p < 64; p++) blocks[b][p] = 0;
      blocks[b][0] = int'($urandom_range(0, 255));
      case (kind)
        0, 1, 2: for (int p = 1; p < 64; p++)                    // sparse
                   if ($urandom_range(0, 99) < 25 - p / 3) blocks[b][p] = rnd_val(60);
        3: ;                                                     // DC only
        4: begin blocks[b][17 + int'($urandom_range(0, 3))] = rnd_val(5);   // runs >= 16
                 blocks[b][50 + int'($urandom_range(0, 12))] = rnd_val(900); end
        5: begin for (int p = 1; p < 64; p += 1 + int'($urandom_range(0, 4)))
                   blocks[b][p] = rnd_val(1000);
                 blocks[b][63] = rnd_val(30); end                // ends non-zero
        6: begin blocks[b][0] = rnd_val(2047);                   // wide values
                 for (int p = 1; p < 64; p++)
                   if ($urandom_range(0, 9) == 0) blocks[b][p] = rnd_val(1023); end
        default: begin blocks[b][0] = 2500 + int'($urandom_range(0, 100));   // clamped
                 blocks[b][1] = -1500; blocks[b][2] = 1024; blocks[b][40] = -1024; end
      endcase
    end
    if (NBLK > 9) begin blocks[9][0] = 0; blocks[9][63] = 7; end  // DC 0, run of 62
  end

  initial begin
    build(DC_BITS, DC_NSYM, 1'b1);
    build(AC_BITS, AC_NSYM, 1'b0);
    expect_code("DC size 0", dc_code[0], dc_len[0], 'b00, 2);
    expect_code("DC size 11", dc_code[11], dc_len[11], 'b111111110, 9);
    expect_code("AC 0/1", ac_code[8'h01], ac_len[8'h01], 'b00, 2);
    expect_code("EOB", ac_code[8'h00], ac_len[8'h00], 'b1010, 4);
    expect_code("ZRL", ac_code[8'hF0], ac_len[8'hF0], 'b11111111001, 11);
    expect_code("AC 15/10", ac_code[8'hFA], ac_len[8'hFA], 'hFFFE, 16);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      encode(blocks[b]);
      for (int p = 0; p < 64; p++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_coef  = WORD_W'(blocks[b][p]);
        in_last  = (p == 63);
        while (!in_ready) @(negedge clk);    // transfer at the next rising edge
        @(posedge clk);
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL bits left over"); end
    if (n_zrl == 0 || n_eob == 0 || n_noeob == 0 || n_clamp == 0 || n_neg == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a case never happened: zrl=%0d eob=%0d noeob=%0d clamp=%0d neg=%0d stall=%0d",
               n_zrl, n_eob, n_noeob, n_clamp, n_neg, n_stall);
    end
    $display("cases: zrl=%0d eob=%0d noeob=%0d clamp=%0d neg=%0d stall=%0d",
             n_zrl, n_eob, n_noeob, n_clamp, n_neg, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: random back-pressure, every bit compared
  // (decided and sampled at the falling edge, for the next rising edge)
  bit e;
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (out_valid && !out_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL extra bit at %0t", $time);
      end else begin
        e = exp_q.pop_front();
        if (out_bit != e) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0b want %0b at %0t", out_bit, e, $time);
        end
      end
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
