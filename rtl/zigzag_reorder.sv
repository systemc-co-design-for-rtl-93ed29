// zigzag_reorder: turns an 8x8 block of quantised coefficients, received as
// eight rows, into a single 64-entry sequence in zig-zag order (DC first, then
// along the anti-diagonals from low to high frequency), the form the run-length
// and entropy coder works on.
//
// The block is collected in a 64-word buffer (FILL), then read out one value per
// transfer at raster address ZIGZAG[n], n = 0..63 (DRAIN). The scan table
// is computed at elaboration by dct_pkg::zigzag_table. The source article gives the
// function (reorder into a single array in zig-zag pattern); the single-buffer
// fill-then-drain organisation and the interface are this design's choices.
//
// Interface: rows in by valid/ready (rows 0..7 in order, in_coef[k] = column k);
// values out by valid/ready with the scan position out_idx and out_last on the
// 64th. Timing: in_ready is high during FILL; out_valid is high during DRAIN,
// starting the cycle after the eighth row; 8 + 64 cycles per block unstalled.
module zigzag_reorder
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [WORD_W-1:0]  in_coef [N],
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [5:0]                out_idx,
  output logic signed [WORD_W-1:0]  out_coef,
  output logic                      out_last
);

  logic signed [WORD_W-1:0] buf_q [64];
  logic                     draining;
  logic [2:0]               row;
  logic [5:0]               pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      row      <= '0;
      pos      <= '0;
    end else if (!draining) begin
      if (in_valid) begin
        row <= row + 1'b1;
        if (row == 3'd7) draining <= 1'b1;
      end
    end else if (out_ready) begin
      pos <= pos + 1'b1;
      if (pos == 6'd63) draining <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!draining && in_valid)
      for (int k = 0; k < N; k++) buf_q[{row, 3'(k)}] <= in_coef[k];
  end

  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_idx   = pos;
  assign out_coef  = buf_q[ZIGZAG[pos]];
  assign out_last  = (pos == 6'd63);

endmodule
