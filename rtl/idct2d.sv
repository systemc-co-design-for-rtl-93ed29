// idct2d: 8x8 two-dimensional inverse DCT, the decoder's counterpart of dct2d.
//
// Same two-pass organisation as the forward transform: each coefficient row
// goes through the 8-point inverse DCT (idct1d) and is stored in the
// transposition RAM in row order; each RAM column is then inverse-transformed
// by the same unit and written back in column order; the RAM is finally read in
// row order. Row r of the output is pixel row r of the block.
//
// Number format: coefficients are signed 15-bit integers. The row pass keeps
// MID_FRAC fraction bits in the RAM; the column pass rounds to integers and the
// output clamps them to the pixel range 0 .. 2^PIX_W-1.
// The source article names the 2D-IDCT and its function only; mirroring the forward
// design is this design's choice.
//
// Interface: valid/ready on both sides, one row of eight values per transfer,
// rows 0..7 of a block in order (in_coef[k] = F(row, k); out_pix[k] = pixel
// (out_row, k)). block_done pulses after the last output row is taken.
// Timing without stalls equals dct2d: first output row 336 cycles after the
// first input transfer, 344 cycles per block.
module idct2d
  import dct_pkg::*;
#(
  parameter int unsigned PIX_W    = 8,   // grayscale pixel width
  parameter int unsigned MID_FRAC = 3    // fraction bits kept between passes
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // coefficient rows in
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [WORD_W-1:0]  in_coef  [N],
  // pixel rows out
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [2:0]                out_row,
  output logic [PIX_W-1:0]          out_pix  [N],
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
  // Clamp to the pixel range.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      if (ram_rdata[k] < 0)                                  out_pix[k] = '0;
      else if (ram_rdata[k] > WORD_W'((1 << PIX_W) - 1))     out_pix[k] = '1;
      else                                                   out_pix[k] = ram_rdata[k][PIX_W-1:0];
    end
  end

  // 1D-IDCT operand selection: coefficient row (row pass) or RAM column.
  always_comb begin
    for (int k = 0; k < N; k++)
      d1_in[k] = (state == S_COL_GO) ? ram_rdata[k] : in_coef[k];
  end
  assign d1_start = (state == S_ROW_IN && in_valid) || (state == S_COL_GO);
  assign d1_shift = (state == S_COL_GO) ? COL_SHIFT : ROW_SHIFT;

  idct1d u_idct1d (
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
    else $error("idct2d: 1D unit started while busy");
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_row))
    else $error("idct2d: output row dropped while stalled");

endmodule
