// dequantizer: inverse quantiser of the decoder. Rescales each quantised value
// by its step size, F' = q * Q, saturated to the signed 15-bit coefficient
// range, with the same resettable and writable 8x8 step table as the quantiser.
// The source article gives only the block's purpose (rescaling to DCT coefficients);
// the table, saturation and interface are this design's choices.
//
// Interface and timing match quantizer: valid/ready rows of eight values,
// one register stage, one row per cycle.
module dequantizer
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tbl_we,
  input  logic [5:0]                tbl_addr,
  input  logic [7:0]                tbl_data,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [2:0]                in_row,
  input  logic signed [WORD_W-1:0]  in_q    [N],
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [2:0]                out_row,
  output logic signed [WORD_W-1:0]  out_coef [N]
);

  localparam int P_W = WORD_W + 9;
  localparam logic signed [P_W-1:0] MAXV = P_W'((1 << (WORD_W - 1)) - 1);
  localparam logic signed [P_W-1:0] MINV = -P_W'(1 << (WORD_W - 1));

  logic [7:0]               qtab [64];
  logic signed [WORD_W-1:0] c_d  [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qtab <= QTABLE_DEFAULT;
    else if (tbl_we) qtab[tbl_addr] <= tbl_data;
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [7:0]           step;
      logic signed [P_W-1:0] p;
      step = qtab[{in_row, 3'(k)}];
      if (step == '0) step = 8'd1;
      p = P_W'(in_q[k]) * $signed({1'b0, step});
      if (p > MAXV)      c_d[k] = MAXV[WORD_W-1:0];
      else if (p < MINV) c_d[k] = MINV[WORD_W-1:0];
      else               c_d[k] = p[WORD_W-1:0];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      for (int k = 0; k < N; k++) out_coef[k] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_row  <= in_row;
        out_coef <= c_d;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_row))
    else $error("dequantizer: output changed while stalled");

endmodule
