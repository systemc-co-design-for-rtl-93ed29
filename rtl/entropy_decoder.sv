// entropy_decoder: reads the serial bit stream of entropy_encoder and rebuilds
// the 64 zig-zag ordered quantised coefficients of each block.
//
// How it works. Huffman codes are canonical, so a code is found one bit at a
// time with no search. The bits read so far form a value c of length L. It is a
// complete code when FIRST[L] <= c < FIRST[L] + BITS[L], and its symbol is then
// VALS[INDEX[L] + c - FIRST[L]]. The tables are the dct_pkg ones, which the
// encoder also uses. At position 0 the DC table is used, elsewhere the AC table.
//   * DC {size}: read size amplitude bits and emit the value.
//   * AC {run, size}: read the amplitude bits, emit run zeros, then the value.
//   * ZRL: emit 16 zeros.
//   * EOB: emit zeros up to the end of the block.
// Amplitude bits a of size s give v = a if the top bit is 1, else a - (2^s - 1).
//
// The source article gives the function: Huffman entropy decoding based on
// run-length data and DC/AC look-up tables. This design chooses the
// bit-at-a-time canonical decoding, the state machine and the interface. It
// also matches the encoder's choices (JPEG tables, DC not differenced).
//
// Interface: bits in by valid/ready, values out by valid/ready with out_last
// on the 64th of a block. Timing: one input bit per cycle while a code or
// amplitude is read (in_ready high), then one output value per cycle
// (out_valid high). The two never overlap.
module entropy_decoder
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic                      in_bit,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic signed [WORD_W-1:0]  out_coef,
  output logic                      out_last
);

  typedef enum logic [1:0] {S_SYM, S_AMP, S_EMIT} state_e;

  state_e                   state_q;
  logic [HUFF_LEN-2:0]      code_q;     // code bits read so far
  logic [3:0]               clen_q;     // their number
  logic [3:0]               size_q;     // amplitude bits expected
  logic [3:0]               acnt_q;     // amplitude bits still to read
  logic [9:0]               amp_q;
  logic [4:0]               run_q;      // zeros to emit before the value
  logic                     val_q;      // a value follows the zeros
  logic                     eob_q;      // zeros to the end of the block
  logic signed [WORD_W-1:0] value_q;
  logic [5:0]               pos_q;      // scan position of the next output

  assign in_ready  = (state_q != S_EMIT);
  assign out_valid = (state_q == S_EMIT);
  assign out_coef  = (eob_q || run_q != '0) ? '0 : value_q;
  assign out_last  = (pos_q == 6'd63);

  // Canonical lookup of the code extended by the incoming bit.
  logic [HUFF_LEN-1:0] c;
  logic [3:0]          l;        // length - 1 of c, indexes the tables
  logic                hit;
  logic [7:0]          sym;
  logic [HUFF_LEN-1:0] first, cnt;
  logic [7:0]          idx;

  always_comb begin
    c   = {code_q, in_bit};
    l   = clen_q;
    if (pos_q == '0) begin
      first = DC_FIRST[l];
      cnt   = HUFF_LEN'(DC_BITS[l]);
      idx   = DC_INDEX[l];
    end else begin
      first = AC_FIRST[l];
      cnt   = HUFF_LEN'(AC_BITS[l]);
      idx   = AC_INDEX[l];
    end
    hit = (cnt != '0) && (c >= first) && (c - first < cnt);
    idx = idx + 8'(c - first);
    if (pos_q == '0) sym = DC_VALS[(idx < 8'(DC_NSYM)) ? 4'(idx) : 4'd0];
    else             sym = AC_VALS[(idx < 8'(AC_NSYM)) ? idx : 8'd0];
  end

  // Value of amplitude bits a with size s.
  function automatic logic signed [WORD_W-1:0] amp_value(logic [10:0] a, logic [3:0] s);
    logic signed [WORD_W-1:0] x;
    x = WORD_W'(a);
    if (s == '0)         return '0;
    else if (a[s - 1])   return x;
    else                 return x - WORD_W'((1 << s) - 1);
  endfunction

  logic [10:0] amp_d;
  assign amp_d = {amp_q, in_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_SYM;
      code_q  <= '0;
      clen_q  <= '0;
      size_q  <= '0;
      acnt_q  <= '0;
      amp_q   <= '0;
      run_q   <= '0;
      val_q   <= 1'b0;
      eob_q   <= 1'b0;
      value_q <= '0;
      pos_q   <= '0;
    end else begin
      unique case (state_q)
        S_SYM: if (in_valid) begin
          if (hit) begin
            code_q <= '0;
            clen_q <= '0;
            amp_q  <= '0;
            if (pos_q == '0) begin              // DC: size only
              run_q  <= '0;
              eob_q  <= 1'b0;
              val_q  <= 1'b1;
              size_q <= sym[3:0];
              acnt_q <= sym[3:0];
              if (sym[3:0] == '0) begin
                value_q <= '0;
                state_q <= S_EMIT;
              end else
                state_q <= S_AMP;
            end else if (sym == 8'h00) begin    // EOB
              eob_q   <= 1'b1;
              val_q   <= 1'b0;
              run_q   <= '0;
              state_q <= S_EMIT;
            end else if (sym == 8'hF0) begin    // ZRL
              eob_q   <= 1'b0;
              val_q   <= 1'b0;
              run_q   <= 5'd16;
              state_q <= S_EMIT;
            end else begin                      // {run, size}
              eob_q   <= 1'b0;
              val_q   <= 1'b1;
              run_q   <= {1'b0, sym[7:4]};
              size_q  <= sym[3:0];
              acnt_q  <= sym[3:0];
              state_q <= S_AMP;
            end
          end else if (clen_q == 4'(HUFF_LEN - 1)) begin
            code_q <= '0;                       // no such code: drop the bits
            clen_q <= '0;
          end else begin
            code_q <= c[HUFF_LEN-2:0];
            clen_q <= clen_q + 4'd1;
          end
        end
        S_AMP: if (in_valid) begin
          amp_q  <= amp_d[9:0];
          acnt_q <= acnt_q - 4'd1;
          if (acnt_q == 4'd1) begin
            value_q <= amp_value(amp_d, size_q);
            state_q <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) begin
          pos_q <= pos_q + 6'd1;               // wraps to 0 after 63
          if (eob_q) begin
            if (pos_q == 6'd63) begin
              eob_q   <= 1'b0;
              state_q <= S_SYM;
            end
          end else if (run_q != '0) begin
            run_q <= run_q - 5'd1;
            if (run_q == 5'd1 && !val_q) state_q <= S_SYM;
          end else begin
            val_q   <= 1'b0;
            state_q <= S_SYM;
          end
        end
        default: state_q <= S_SYM;
      endcase
    end
  end

  // The output holds while it is stalled.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_coef))
    else $error("entropy_decoder: output changed while stalled");

endmodule
