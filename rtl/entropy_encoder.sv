// entropy_encoder: run-length and Huffman coder for the zig-zag ordered
// quantised coefficients of one 8x8 block, producing a serial bit stream.
//
// How it works. The first value of a block (DC) is sent as the Huffman code of
// its size category followed by its amplitude bits. Each later value (AC) that
// is zero only lengthens the current run. A non-zero AC value is sent as the
// code of the symbol {run, size} followed by its amplitude bits. Runs of 16 or
// more are first cut by ZRL codes (16 zeros each). If the block ends on zeros,
// one EOB code is sent instead of them. An amplitude of size s is the low s bits
// of v (v > 0) or of v - 1 (v < 0). Codes come from the canonical tables in
// dct_pkg (the JPEG example luminance tables).
//
// Each accepted value builds one token of up to 3 ZRL codes plus a code and
// its amplitude (at most 3*11 + 16 + 11 = 60 bits). The token sits left-aligned
// in a 64-bit shift register and leaves MSB first, one bit per transfer.
//
// The source article gives the function: Huffman entropy encoding based on
// run-length data and DC/AC look-up tables. This design chooses the rest:
//  * the JPEG tables;
//  * DC sent as its value, not as a difference from the previous block;
//  * values clamped to the table range (DC to +-2047, AC to +-1023), which only
//    a quantiser step of 1 can reach;
//  * no byte packing and no marker stuffing;
//  * the bit-serial interface.
//
// Interface: values in by valid/ready (in_last on the 64th of a block), bits
// out by valid/ready. Timing: a value is taken only while the shift register
// is empty. Each value costs one cycle, plus one cycle per bit it emits.
module entropy_encoder
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [WORD_W-1:0]  in_coef,
  input  logic                      in_last,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic                      out_bit
);

  localparam int unsigned TOK_W = 64;
  localparam logic signed [WORD_W-1:0] DC_LIM = WORD_W'((1 << DC_MAX_SIZE) - 1);
  localparam logic signed [WORD_W-1:0] AC_LIM = WORD_W'((1 << AC_MAX_SIZE) - 1);

  logic [TOK_W-1:0] tok_q;       // bits still to send, MSB first
  logic [6:0]       tok_len_q;   // how many
  logic [5:0]       pos_q;       // scan position of the next value
  logic [5:0]       run_q;       // zeros seen since the last coded value

  assign in_ready  = (tok_len_q == '0);
  assign out_valid = (tok_len_q != '0);
  assign out_bit   = tok_q[TOK_W-1];

  // Append a field of len bits (right-aligned in f) after the first n bits of t.
  function automatic logic [TOK_W-1:0] append(logic [TOK_W-1:0] t, int unsigned n,
                                              logic [HUFF_LEN-1:0] f, int unsigned len);
    logic [TOK_W-1:0] w;
    w = TOK_W'(f) << (TOK_W - len);
    return t | (w >> n);
  endfunction

  // Token for the value in_coef at position pos_q with the current run.
  logic [TOK_W-1:0]         tok_d;
  logic [6:0]               len_d;
  logic [5:0]               run_d;
  logic signed [WORD_W-1:0] v;
  logic [3:0]               sz;
  logic [WORD_W-1:0]        amp;
  logic [7:0]               sym;
  huff_code_t               ent;       // table entry {code, length}
  int unsigned              n;

  always_comb begin
    tok_d = '0;
    n     = 0;
    run_d = run_q;
    sym   = '0;
    ent   = '0;
    // clamp to the range the tables cover
    if (pos_q == '0)
      v = (in_coef > DC_LIM) ? DC_LIM : (in_coef < -DC_LIM) ? -DC_LIM : in_coef;
    else
      v = (in_coef > AC_LIM) ? AC_LIM : (in_coef < -AC_LIM) ? -AC_LIM : in_coef;
    sz  = size_cat(v);
    amp = v[WORD_W-1] ? WORD_W'(v - 1) : WORD_W'(v);
    amp = amp & WORD_W'((1 << sz) - 1);

    if (pos_q == '0) begin
      ent   = DC_CODE[sz];
      tok_d = append(tok_d, n, ent[HUFF_LEN+4:5], int'(ent[4:0]));
      n     = n + int'(ent[4:0]);
      tok_d = append(tok_d, n, HUFF_LEN'(amp), int'(sz));
      n     = n + int'(sz);
      run_d = '0;
    end else if (v == '0) begin
      run_d = run_q + 6'd1;
      if (in_last) begin
        ent   = AC_CODE[8'h00];
        tok_d = append(tok_d, n, ent[HUFF_LEN+4:5], int'(ent[4:0]));
        n     = n + int'(ent[4:0]);
        run_d = '0;
      end
    end else begin
      for (int z = 1; z <= 3; z++)
        if (int'(run_q) >= 16 * z) begin
          ent   = AC_CODE[8'hF0];
          tok_d = append(tok_d, n, ent[HUFF_LEN+4:5], int'(ent[4:0]));
          n     = n + int'(ent[4:0]);
        end
      sym   = {run_q[3:0], sz};
      ent   = AC_CODE[sym];
      tok_d = append(tok_d, n, ent[HUFF_LEN+4:5], int'(ent[4:0]));
      n     = n + int'(ent[4:0]);
      tok_d = append(tok_d, n, HUFF_LEN'(amp), int'(sz));
      n     = n + int'(sz);
      run_d = '0;
    end
    len_d = 7'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q     <= '0;
      tok_len_q <= '0;
      pos_q     <= '0;
      run_q     <= '0;
    end else if (in_valid && in_ready) begin
      tok_q     <= tok_d;
      tok_len_q <= len_d;
      run_q     <= run_d;
      pos_q     <= in_last ? 6'd0 : pos_q + 6'd1;
    end else if (out_valid && out_ready) begin
      tok_q     <= tok_q << 1;
      tok_len_q <= tok_len_q - 7'd1;
    end
  end

  // The reorder stage marks the 64th value of each block.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready |-> in_last == (pos_q == 6'd63))
    else $error("entropy_encoder: in_last out of step with the block position");

endmodule
