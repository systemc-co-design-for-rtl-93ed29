// dct_shift_acc: ROM-shift-accumulator of one DCT output F_x.
//
// Distributed arithmetic writes F_x = sum_j 2^j D_x(bit-plane j) - 2^(B-1) D_x(sign
// bit-plane). The bit-planes arrive most significant first, so the unit works as
//   sign cycle ('first'=1):  acc = -D
//   other cycles:            acc = 2*acc + D     (shifter and adder)
// which after B cycles leaves the exact sum in 'acc' (ROM fraction bits included).
// The parts follow the source article's split: a shifter, the previous-data register
// (the accumulator fed back through the shifter), the data register that samples
// the ROM word, and the final buffer that holds the result for the output port.
//
// The final buffer stores round(acc / 2^out_shift) saturated to OUT_W bits; this
// rounding and saturation are this design's choice.
//
// Timing: 'rom_data' is sampled into the data register on an 'acc_en' cycle and
// added one cycle later, so 'acc' lags the ROM by one cycle. 'first' travels
// with the sample. 'load_out' copies the rounded accumulator into the final
// buffer; pulse it two cycles after the last 'acc_en', when 'acc' is final. 'out_shift' must be
// between 1 and ACC_W-1.
module dct_shift_acc
  import dct_pkg::*;
#(
  parameter int unsigned OUT_W = WORD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      acc_en,     // a ROM word is present
  input  logic                      first,      // this ROM word is the sign bit-plane
  input  logic signed [ROM_W-1:0]   rom_data,
  input  logic                      load_out,   // capture rounded result
  input  logic [SHIFT_W-1:0]        out_shift,
  output logic signed [OUT_W-1:0]   final_data,
  output logic signed [ACC_W-1:0]   acc         // raw accumulator (exact sum)
);

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(1 <<< (OUT_W-1));

  logic signed [ROM_W-1:0] data_q;     // data register
  logic                    data_vld;
  logic                    data_first;
  logic signed [ACC_W-1:0] acc_q;      // previous-data register
  logic signed [ACC_W-1:0] shifted;
  logic signed [ACC_W-1:0] acc_d;
  logic signed [ACC_W-1:0] rounded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q     <= '0;
      data_vld   <= 1'b0;
      data_first <= 1'b0;
    end else begin
      data_vld   <= acc_en;
      data_first <= first;
      if (acc_en) data_q <= rom_data;
    end
  end

  // Shifter and adder/subtractor.
  always_comb begin
    shifted = acc_q <<< 1;
    if (data_first) acc_d = -ACC_W'(data_q);
    else            acc_d = shifted + ACC_W'(data_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc_q <= '0;
    else if (data_vld) acc_q <= acc_d;
  end

  assign acc = acc_q;

  // Rounding right shift with saturation into the final buffer.
  always_comb begin
    rounded = (acc_q + (ACC_W'(1) <<< (out_shift - 1))) >>> out_shift;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                final_data <= '0;
    else if (load_out) begin
      if (rounded > OUT_MAX)      final_data <= OUT_MAX[OUT_W-1:0];
      else if (rounded < OUT_MIN) final_data <= OUT_MIN[OUT_W-1:0];
      else                        final_data <= rounded[OUT_W-1:0];
    end
  end

endmodule
