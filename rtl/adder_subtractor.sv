// adder_subtractor: the adder/subtractor (AS) of the video encoder/decoder.
//
// Works on one row of eight pixels per cycle. In subtract mode (encoder) it
// forms the prediction residual cur - pred of an 8-bit current-frame pixel and
// an 8-bit predicted pixel, a signed 9-bit value. In add mode (decoder) it adds
// a signed residual to the predicted pixel and clamps the sum to 0..255 to
// rebuild the frame. The source article states only that the module adds or subtracts
// its input frames; widths, clamping, the row format and the single register
// stage are this design's choices. The prediction module that supplies 'pred'
// is not part of this RTL.
//
// Interface: in_valid with mode, a[] and pred[]; one cycle later out_valid with
// y[]. In subtract mode the low PIX_W bits of a[k] are the current pixel,
// read as unsigned, and y[k] = a[k] - pred[k]; in add mode a[k] is a signed
// residual and y[k] = clamp(a[k] + pred[k]) to 0 .. 2^PIX_W - 1.
module adder_subtractor #(
  parameter int unsigned PIX_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     mode_add,          // 0: subtract, 1: add
  input  logic signed [PIX_W:0]    a    [8],          // current pixel or residual
  input  logic [PIX_W-1:0]         pred [8],          // predicted pixel
  output logic                     out_valid,
  output logic signed [PIX_W:0]    y    [8]           // residual or rebuilt pixel
);

  localparam logic signed [PIX_W+1:0] PMAX = (PIX_W+2)'((1 << PIX_W) - 1);

  logic signed [PIX_W:0] y_d [8];

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic signed [PIX_W+1:0] s;
      if (mode_add) begin
        s = (PIX_W+2)'(a[k]) + $signed({2'b00, pred[k]});
        if (s < 0)         y_d[k] = '0;
        else if (s > PMAX) y_d[k] = PMAX[PIX_W:0];
        else               y_d[k] = s[PIX_W:0];
      end else begin
        s = $signed({2'b00, a[k][PIX_W-1:0]}) - $signed({2'b00, pred[k]});
        y_d[k] = s[PIX_W:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) y[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_d;
    end
  end

endmodule
