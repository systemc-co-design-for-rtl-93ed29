// dct2d: 8x8 two-dimensional forward DCT built from one distributed-arithmetic
// 1D-DCT and a transposition RAM.
//
// The 2D DCT is separable, so it runs as two passes of the 8-point 1D DCT:
//   1. row pass:    each of the 8 pixel rows goes through dct1d; the 8 results
//                   are written into the transposition RAM in row order;
//   2. column pass: each RAM column is read, transformed by the same dct1d, and
//                   written back into the same column;
//   3. readout:     the RAM is read in row order; row r holds F(r, 0..7), where
//                   r is the vertical and the column index the horizontal
//                   frequency of the 2D DCT.
// The data flow (row pass, RAM in row order, column pass, column write-back,
// row-order readout) follows the source article. One shared 1D unit (rather than two)
// and the FSM below are this design's choices.
//
// Number format: pixels are unsigned PIX_W-bit values used without level shift.
// The row pass keeps MID_FRAC fraction bits in the RAM (15-bit words); the
// column pass rounds to integers, so out_coef = round(F) within about one unit.
//
// Interface: valid/ready on both sides.
//  * in_valid/in_ready/in_pix[8]: one pixel row per transfer, rows 0..7 of a
//    block in order. in_ready is high only while the unit waits for a row.
//  * out_valid/out_ready/out_row/out_coef[8]: one coefficient row per transfer,
//    rows 0..7 in order; out_coef[k] = F(out_row, k). Held while out_ready low.
//  * block_done pulses after the last output row of a block is taken.
// Timing without stalls: a row or column takes 21 cycles (dct1d latency 20 plus
// one hand-over cycle), so the first output row is valid 336 cycles after the
// first input transfer and a block occupies the unit for 344 cycles. The next
// block's first row is accepted after the last output row is taken.
module dct2d
  import dct_pkg::*;
#(
  parameter int unsigned PIX_W    = 8,   // grayscale pixel width
  parameter int unsigned MID_FRAC = 3    // fraction bits kept between passes
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // pixel rows in
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [PIX_W-1:0]          in_pix   [N],
  // coefficient rows out
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [2:0]                out_row,
  output logic signed [WORD_W-1:0]  out_coef [N],
  output logic                      block_done
);

  typedef enum logic [2:0] {S_ROW_IN, S_ROW_WAIT, S_COL_GO, S_COL_WAIT, S_OUT} state_e;

  localparam logic [SHIFT_W-1:0] ROW_SHIFT = SHIFT_W'(COEF_FRAC - MID_FRAC);
  localparam logic [SHIFT_W-1:0] COL_SHIFT = SHIFT_W'(COEF_FRAC + MID_FRAC);

  state_e                      state;
  logic [2:0]                  idx;          // current row or column
  logic                        d1_start, d1_busy, d1_done;
  logic signed [WORD_W-1:0]    d1_in  [N];
  logic signed [WORD_W-1:0]    d1_out [N];
  logic [SHIFT_W-1:0]          d1_shift;
  logic                        ram_we, ram_wr_col, ram_rd_col;
  logic signed [WORD_W-1:0]    ram_rdata [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_ROW_IN;
      idx        <= '0;
      block_done <= 1'b0;
    end else begin
      block_done <= 1'b0;
      case (state)
        S_ROW_IN:   if (in_valid) state <= S_ROW_WAIT;
        S_ROW_WAIT: if (d1_done) begin
          idx   <= idx + 1'b1;                      // wraps to column 0 after row 7
          state <= (idx == 3'd7) ? S_COL_GO : S_ROW_IN;
        end
        S_COL_GO:   state <= S_COL_WAIT;
        S_COL_WAIT: if (d1_done) begin
          idx   <= idx + 1'b1;
          state <= (idx == 3'd7) ? S_OUT : S_COL_GO;
        end
        default:    if (out_ready) begin            // S_OUT
          idx <= idx + 1'b1;
          if (idx == 3'd7) begin
            state      <= S_ROW_IN;
            block_done <= 1'b1;
          end
        end
      endcase
    end
  end

  assign in_ready  = (state == S_ROW_IN);
  assign out_valid = (state == S_OUT);
  assign out_row   = idx;
  assign out_coef  = ram_rdata;

  // 1D-DCT operand selection: pixel row (row pass) or RAM column (column pass).
  always_comb begin
    for (int k = 0; k < N; k++)
      d1_in[k] = (state == S_COL_GO) ? ram_rdata[k] : WORD_W'(in_pix[k]);
  end
  assign d1_start = (state == S_ROW_IN && in_valid) || (state == S_COL_GO);
  assign d1_shift = (state == S_COL_GO) ? COL_SHIFT : ROW_SHIFT;

  dct1d u_dct1d (
    .clk, .rst_n,
    .start     (d1_start),
    .fx        (d1_in),
    .out_shift (d1_shift),
    .busy      (d1_busy),
    .done      (d1_done),
    .fout      (d1_out)
  );

  assign ram_we     = d1_done && (state == S_ROW_WAIT || state == S_COL_WAIT);
  assign ram_wr_col = (state == S_COL_WAIT);
  assign ram_rd_col = (state == S_COL_GO);

  dct_transpose_ram u_tram (
    .clk,
    .we     (ram_we),
    .wr_col (ram_wr_col),
    .wr_idx (idx),
    .wdata  (d1_out),
    .rd_col (ram_rd_col),
    .rd_idx (idx),
    .rdata  (ram_rdata)
  );

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) d1_start |-> !d1_busy)
    else $error("dct2d: 1D unit started while busy");
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_row))
    else $error("dct2d: output row dropped while stalled");

  initial assert (PIX_W + 3 + MID_FRAC <= WORD_W - 1)
    else $error("dct2d: PIX_W + MID_FRAC too wide for the 15-bit intermediate word");

endmodule
