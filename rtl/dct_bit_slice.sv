// dct_bit_slice: bit-slice data unit of the distributed-arithmetic DCT.
//
// Holds the four butterfly values (u_0..u_3 or v_0..v_3, B bits each, two's
// complement) and presents one bit-plane of them per clock as the 4-bit ROM
// address, most significant (sign) bit-plane first. 'load' captures new values;
// each 'shift' moves every value one place to the left so the next lower
// bit-plane appears. 'addr' bit i is the current top bit of value i.
//
// The source article names this unit ("bit slice data", controlling the B bits); the
// MSB-first order and the load/shift interface are this design's choice.
//
// Timing: 'addr' is valid the cycle after 'load' and changes after each 'shift'.
module dct_bit_slice
  import dct_pkg::*;
#(
  parameter int unsigned B = BITS      // bits per value
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     shift,
  input  logic signed [B-1:0]      din  [HALF],
  output logic [HALF-1:0]          addr
);

  logic [B-1:0] sreg [HALF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HALF; i++) sreg[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < HALF; i++) sreg[i] <= din[i];
    end else if (shift) begin
      for (int i = 0; i < HALF; i++) sreg[i] <= {sreg[i][B-2:0], 1'b0};
    end
  end

  always_comb begin
    for (int i = 0; i < HALF; i++) addr[i] = sreg[i][B-1];
  end

  a_load_shift_excl: assert property (@(posedge clk) disable iff (!rst_n) !(load && shift))
    else $error("dct_bit_slice: load and shift in the same cycle");

endmodule
