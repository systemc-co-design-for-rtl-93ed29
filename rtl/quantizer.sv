// quantizer: divides each DCT coefficient by its step size from an 8x8
// quantisation table, so that coefficients of little visual weight become
// small or zero.
//
// q = sign(F) * floor((|F| + Q/2) / Q), i.e. F/Q rounded to nearest with ties
// away from zero, for the table entry Q of the coefficient's position. The
// table resets to the example luminance table of the JPEG standard and can be
// rewritten one entry at a time (a step of 0 is treated as 1).
// The source article gives only the quantiser's purpose; the rounding rule, the
// table and the interface are this design's choices.
//
// Interface: valid/ready rows of eight coefficients (in_coef[k] = F(in_row, k))
// in and out; the table write port (tbl_we, tbl_addr = 8*row + column,
// tbl_data) may be used at any time and affects rows accepted afterwards.
// Timing: one register stage; a row is accepted every cycle when out_ready is
// high and appears on the output one cycle after it is accepted.
module quantizer
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
  input  logic signed [WORD_W-1:0]  in_coef [N],
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [2:0]                out_row,
  output logic signed [WORD_W-1:0]  out_q   [N]
);

  logic [7:0]               qtab [64];
  logic signed [WORD_W-1:0] q_d  [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qtab <= QTABLE_DEFAULT;
    else if (tbl_we) qtab[tbl_addr] <= tbl_data;
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [7:0]        step;
      logic [WORD_W-1:0] mag;
      logic [WORD_W-1:0] quo;
      step = qtab[{in_row, 3'(k)}];
      if (step == '0) step = 8'd1;
      mag  = in_coef[k] < 0 ? WORD_W'(-in_coef[k]) : WORD_W'(in_coef[k]);
      quo  = WORD_W'(({1'b0, mag} + 16'(step >> 1)) / 16'(step));
      q_d[k] = in_coef[k] < 0 ? -$signed(quo) : $signed(quo);
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      for (int k = 0; k < N; k++) out_q[k] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_row <= in_row;
        out_q   <= q_d;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_row))
    else $error("quantizer: output changed while stalled");

endmodule
