// image_codec: still-image encoder and decoder datapaths around the 8x8
// distributed-arithmetic DCT.
//
// Encoder: pixel rows of 8x8 macroblocks -> 2D-DCT (dct2d) -> quantiser ->
// zig-zag reorder -> run-length / Huffman entropy encoder -> bit stream.
// Decoder: bit stream -> entropy decoder -> inverse reorder -> inverse
// quantiser -> 2D-IDCT (idct2d) -> pixel rows.
// The chain of stages follows the source article's image encoder/decoder.
// Connecting enc_out_* to dec_in_* gives a complete coding loop. Both quantisers
// share one table write port, so encoder and decoder always use the same step
// sizes. The adder/subtractor of the video system (residual = current -
// predicted, and its inverse) sits beside the codec on the vid_* ports: the
// prediction module that would feed it is not part of this RTL.
//
// All transfers use valid/ready. The encoder takes one pixel row per transfer
// (rows 0..7 of each block in order, raster order of blocks is up to the
// source); the decoder returns pixel rows in the same order. The 2D transforms
// take 344 cycles per block. The entropy coders move one bit per cycle, so a
// block whose code is longer than about 280 bits makes them the slower stage.
module image_codec
  import dct_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // quantisation table (raster address 8*row + column)
  input  logic                      tbl_we,
  input  logic [5:0]                tbl_addr,
  input  logic [7:0]                tbl_data,
  // encoder: pixel rows in
  input  logic                      enc_in_valid,
  output logic                      enc_in_ready,
  input  logic [PIX_W-1:0]          enc_in_pix [N],
  // encoder: zig-zag coefficient stream out
  output logic                      enc_out_valid,
  input  logic                      enc_out_ready,
  output logic                      enc_out_bit,
  output logic                      enc_block_done,   // 2D-DCT finished a block
  // decoder: zig-zag coefficient stream in
  input  logic                      dec_in_valid,
  output logic                      dec_in_ready,
  input  logic                      dec_in_bit,
  // decoder: pixel rows out
  output logic                      dec_out_valid,
  input  logic                      dec_out_ready,
  output logic [2:0]                dec_out_row,
  output logic [PIX_W-1:0]          dec_out_pix [N],
  output logic                      dec_block_done,
  // video adder/subtractor, pixel rows (prediction module not included)
  input  logic                      vid_valid,
  input  logic                      vid_mode_add,
  input  logic signed [PIX_W:0]     vid_a    [N],
  input  logic [PIX_W-1:0]          vid_pred [N],
  output logic                      vid_out_valid,
  output logic signed [PIX_W:0]     vid_y    [N]
);

  // ---------------------------------------------------------------- encoder
  logic                     dct_valid, dct_ready;
  logic [2:0]               dct_row;
  logic signed [WORD_W-1:0] dct_coef [N];
  logic                     q_valid, q_ready;
  logic [2:0]               q_row;
  logic signed [WORD_W-1:0] q_coef [N];
  logic                     zz_valid, zz_ready, zz_last;
  logic [5:0]               zz_idx;
  logic signed [WORD_W-1:0] zz_coef;

  dct2d #(.PIX_W(PIX_W)) u_dct2d (
    .clk, .rst_n,
    .in_valid   (enc_in_valid),
    .in_ready   (enc_in_ready),
    .in_pix     (enc_in_pix),
    .out_valid  (dct_valid),
    .out_ready  (dct_ready),
    .out_row    (dct_row),
    .out_coef   (dct_coef),
    .block_done (enc_block_done)
  );

  quantizer u_quantizer (
    .clk, .rst_n, .tbl_we, .tbl_addr, .tbl_data,
    .in_valid  (dct_valid),
    .in_ready  (dct_ready),
    .in_row    (dct_row),
    .in_coef   (dct_coef),
    .out_valid (q_valid),
    .out_ready (q_ready),
    .out_row   (q_row),
    .out_q     (q_coef)
  );

  zigzag_reorder u_reorder (
    .clk, .rst_n,
    .in_valid  (q_valid),
    .in_ready  (q_ready),
    .in_coef   (q_coef),
    .out_valid (zz_valid),
    .out_ready (zz_ready),
    .out_idx   (zz_idx),
    .out_coef  (zz_coef),
    .out_last  (zz_last)
  );

  entropy_encoder u_entropy_enc (
    .clk, .rst_n,
    .in_valid  (zz_valid),
    .in_ready  (zz_ready),
    .in_coef   (zz_coef),
    .in_last   (zz_last),
    .out_valid (enc_out_valid),
    .out_ready (enc_out_ready),
    .out_bit   (enc_out_bit)
  );

  // ---------------------------------------------------------------- decoder
  logic                     iz_valid, iz_ready;
  logic [2:0]               iz_row;
  logic signed [WORD_W-1:0] iz_coef [N];
  logic                     dq_valid, dq_ready;
  logic [2:0]               dq_row;
  logic signed [WORD_W-1:0] dq_coef [N];
  logic                     ed_valid, ed_ready, ed_last;
  logic signed [WORD_W-1:0] ed_coef;

  entropy_decoder u_entropy_dec (
    .clk, .rst_n,
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .in_bit    (dec_in_bit),
    .out_valid (ed_valid),
    .out_ready (ed_ready),
    .out_coef  (ed_coef),
    .out_last  (ed_last)
  );

  inverse_reorder u_inv_reorder (
    .clk, .rst_n,
    .in_valid  (ed_valid),
    .in_ready  (ed_ready),
    .in_coef   (ed_coef),
    .out_valid (iz_valid),
    .out_ready (iz_ready),
    .out_row   (iz_row),
    .out_coef  (iz_coef)
  );

  dequantizer u_dequantizer (
    .clk, .rst_n, .tbl_we, .tbl_addr, .tbl_data,
    .in_valid  (iz_valid),
    .in_ready  (iz_ready),
    .in_row    (iz_row),
    .in_q      (iz_coef),
    .out_valid (dq_valid),
    .out_ready (dq_ready),
    .out_row   (dq_row),
    .out_coef  (dq_coef)
  );

  idct2d #(.PIX_W(PIX_W)) u_idct2d (
    .clk, .rst_n,
    .in_valid   (dq_valid),
    .in_ready   (dq_ready),
    .in_coef    (dq_coef),
    .out_valid  (dec_out_valid),
    .out_ready  (dec_out_ready),
    .out_row    (dec_out_row),
    .out_pix    (dec_out_pix),
    .block_done (dec_block_done)
  );

  // ------------------------------------------------------- video path
  // Adder/subtractor of the video encoder/decoder. Its prediction input comes
  // from a prediction module that is not part of this RTL, so it stands beside
  // the image codec with its own ports.
  adder_subtractor #(.PIX_W(PIX_W)) u_adder_subtractor (
    .clk, .rst_n,
    .in_valid  (vid_valid),
    .mode_add  (vid_mode_add),
    .a         (vid_a),
    .pred      (vid_pred),
    .out_valid (vid_out_valid),
    .y         (vid_y)
  );

  // The reorder stage and the 2D-IDCT take rows 0..7 in order and keep their
  // own row count; the row numbers passed along are checked against it.
  // Likewise the entropy decoder's block end must fall on the 64th value the
  // inverse reorder stage takes, and the zig-zag stage's on scan position 63.
  logic [2:0] q_row_exp, dq_row_exp;
  logic [5:0] ed_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_row_exp  <= '0;
      dq_row_exp <= '0;
      ed_pos     <= '0;
    end else begin
      if (q_valid && q_ready)   q_row_exp  <= q_row_exp + 1'b1;
      if (dq_valid && dq_ready) dq_row_exp <= dq_row_exp + 1'b1;
      if (ed_valid && ed_ready) ed_pos     <= ed_pos + 1'b1;
    end
  end

  a_enc_row_order: assert property (@(posedge clk) disable iff (!rst_n) q_valid |-> q_row == q_row_exp)
    else $error("image_codec: encoder rows out of order");
  a_dec_row_order: assert property (@(posedge clk) disable iff (!rst_n) dq_valid |-> dq_row == dq_row_exp)
    else $error("image_codec: decoder rows out of order");
  a_enc_block_end: assert property (@(posedge clk) disable iff (!rst_n)
                                    zz_valid |-> zz_last == (zz_idx == 6'd63))
    else $error("image_codec: zig-zag block end misplaced");
  a_dec_block_end: assert property (@(posedge clk) disable iff (!rst_n)
                                    ed_valid |-> ed_last == (ed_pos == 6'd63))
    else $error("image_codec: decoded block end misplaced");

endmodule
