// inverse_reorder: rebuilds an 8x8 block from the 64-entry zig-zag sequence
// produced by the entropy decoder and hands it on as eight rows.
//
// Each received value n = 0..63 is written to raster address ZIGZAG[n] of a
// 64-word buffer (FILL); after the 64th value the buffer is read out row by row
// (DRAIN). The source article gives the function only; the fill-then-drain
// organisation and the interface are this design's choices.
//
// Interface: values in by valid/ready in scan order (the 64th ends the block);
// rows out by valid/ready with out_row and out_coef[k] = column k.
// Timing: out_valid rises the cycle after the 64th value; 64 + 8 cycles per
// block unstalled.
module inverse_reorder
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [WORD_W-1:0]  in_coef,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [2:0]                out_row,
  output logic signed [WORD_W-1:0]  out_coef [N]
);

  logic signed [WORD_W-1:0] buf_q [64];
  logic                     draining;
  logic [5:0]               pos;
  logic [2:0]               row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      pos      <= '0;
      row      <= '0;
    end else if (!draining) begin
      if (in_valid) begin
        pos <= pos + 1'b1;
        if (pos == 6'd63) draining <= 1'b1;
      end
    end else if (out_ready) begin
      row <= row + 1'b1;
      if (row == 3'd7) draining <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!draining && in_valid) buf_q[ZIGZAG[pos]] <= in_coef;
  end

  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_row   = row;

  always_comb begin
    for (int k = 0; k < N; k++) out_coef[k] = buf_q[{row, 3'(k)}];
  end

endmodule
