// tb_entropy_decoder: self-checking test of the run-length / Huffman decoder.
//
// The testbench builds canonical codes from the code-length counts and symbol
// lists and encodes random blocks itself. It sends the bits with random gaps
// and checks every decoded value against the block, with random output
// stalls. The block mix includes:
//   * sparse blocks;
//   * DC-only blocks;
//   * runs of 16 or more zeros (ZRL);
//   * blocks ending on a non-zero value;
//   * the largest DC and AC magnitudes.
// Each case is counted; one that never happened is a failure.
module tb_entropy_decoder;
  import dct_pkg::*;

  localparam int NBLK = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic                     out_valid, out_ready = 1'b0, out_last;
  logic signed [WORD_W-1:0] out_coef;

  entropy_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_zrl = 0, n_eob = 0, n_stall = 0, n_gap = 0;

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
        if (v > 2047) begin v = 2047;  end
        if (v < -2047) begin v = -2047;  end
        s = size_of(v);
        put(dc_code[s], dc_len[s]);
        put(amp_of(v, s), s);
      end else if (v == 0) begin
        run++;
      end else begin
        if (v > 1023) begin v = 1023;  end
        if (v < -1023) begin v = -1023;  end
                while (run >= 16) begin put(ac_code[8'hF0], ac_len[8'hF0]); run -= 16; n_zrl++; end
        s = size_of(v);
        put(ac_code[run * 16 + s], ac_len[run * 16 + s]);
        put(amp_of(v, s), s);
        run = 0;
      end
    end
    if (run > 0) begin put(ac_code[8'h00], ac_len[8'h00]); n_eob++; end
  endfunction

  // ---- stimulus ------------------------------------------------------------
  int blocks [NBLK][64];
  int kind;

  function automatic int rnd_val(int maxmag);
    int m = 1 + int'($urandom_range(0, maxmag - 1));
    return $urandom_range(0, 1) ? m : -m;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      kind = b % 6;
      for (int p = 0; p < 64; p++) blocks[b][p] = 0;
      blocks[b][0] = int'($urandom_range(0, 255));
      case (kind)
        0, 1: for (int p = 1; p < 64; p++)
                if ($urandom_range(0, 99) < 25 - p / 3) blocks[b][p] = rnd_val(60);
        2: ;
        3: begin blocks[b][18 + int'($urandom_range(0, 3))] = rnd_val(5);
                 blocks[b][52 + int'($urandom_range(0, 10))] = rnd_val(900); end
        4: begin for (int p = 1; p < 64; p += 1 + int'($urandom_range(0, 4)))
                   blocks[b][p] = rnd_val(1023);
                 blocks[b][63] = rnd_val(30); end
        default: begin blocks[b][0] = $urandom_range(0, 1) ? 2047 : -2047;
                 blocks[b][1] = -1023; blocks[b][63] = 1023; end
      endcase
    end
    if (NBLK > 9) begin blocks[9][0] = 0; blocks[9][63] = 7; end
  end

  initial begin
    build(DC_BITS, DC_NSYM, 1'b1);
    build(AC_BITS, AC_NSYM, 1'b0);
    #1;                                      // blocks are made at time 0
    for (int b = 0; b < NBLK; b++) encode(blocks[b]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    while (exp_q.size() != 0) begin
      in_valid = 1'b1;
      in_bit   = exp_q[0];
      while (!in_ready) @(negedge clk);
      @(negedge clk);                        // transferred at the rising edge
      void'(exp_q.pop_front());
      if ($urandom_range(0, 9) == 0) begin
        in_valid = 1'b0;
        n_gap++;
        repeat (1 + $urandom_range(0, 2)) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  // output side: random back-pressure, every value compared
  int b_out = 0, p_out = 0;
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (out_valid && !out_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      if (b_out >= NBLK) begin
        failures++;
        $display("FAIL extra value at %0t", $time);
      end else begin
        if (int'(out_coef) != blocks[b_out][p_out]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d pos %0d: %0d, want %0d", b_out, p_out,
                                      out_coef, blocks[b_out][p_out]);
        end
        if (out_last != (p_out == 63)) begin
          failures++;
          if (failures < 10) $display("FAIL last flag at block %0d pos %0d", b_out, p_out);
        end
        p_out = (p_out + 1) % 64;
        if (p_out == 0) b_out++;
      end
    end
  end

  initial begin
    wait (b_out == NBLK);
    repeat (20) @(posedge clk);
    checks++;
    if (out_valid || exp_q.size() != 0) begin failures++; $display("FAIL left over"); end
    if (n_zrl == 0 || n_eob == 0 || n_stall == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL a case never happened: zrl=%0d eob=%0d stall=%0d gap=%0d",
               n_zrl, n_eob, n_stall, n_gap);
    end
    $display("cases: zrl=%0d eob=%0d stall=%0d gap=%0d", n_zrl, n_eob, n_stall, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
