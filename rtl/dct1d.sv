// dct1d: 8-point forward DCT by distributed arithmetic (DA).
//
// F_x = sum_i C_(i,x) f_i is computed without multipliers. The even/odd symmetry
// of the DCT matrix splits it into two 4-point problems on the butterfly values
//   u_i = f_i + f_(7-i)  (even x)      v_i = f_i - f_(7-i)  (odd x),  i = 0..3.
// Two bit-slice units hand one bit-plane of u_0..u_3 and of v_0..v_3 per clock,
// sign bit-plane first, to eight ROMs (D_0, D_2, D_4, D_6 on u; D_1, D_3, D_5,
// D_7 on v). Each ROM feeds a shift-accumulator, which doubles its sum and adds
// the ROM word (subtracting it for the sign plane). After B = 16 planes the
// eight accumulators hold the exact F_x (times 2^12), which the final buffers
// round by 'out_shift' bits and saturate to 15 bits.
//
// Structure (input registers, butterfly, two bit-slice units, eight ROMs, eight
// shift-accumulators, 15-bit ports) follows the source article. The sequencing FSM,
// MSB-first order, start/done protocol and the run-time 'out_shift' are this
// design's choices; 'out_shift' = 12 gives F_x rounded to an integer.
//
// Interface: pulse 'start' for one cycle while 'busy' is low with fx[] valid;
// fx[] is registered then. 'done' pulses when fout[x] = F_x is valid; fout holds
// its value until the next result.
// Timing: done rises B+4 = 20 cycles after the start cycle; a new start is
// accepted the cycle after done (one transform every 21 cycles back to back).
module dct1d
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [WORD_W-1:0]  fx   [N],   // f_0 .. f_7
  input  logic [SHIFT_W-1:0]        out_shift,  // fraction bits to drop (12: integer F_x)
  output logic                      busy,
  output logic                      done,
  output logic signed [WORD_W-1:0]  fout [N]    // F_0 .. F_7
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_FIN} state_e;

  state_e                       state;
  logic [$clog2(BITS)-1:0]      cnt;
  logic signed [WORD_W-1:0]     fx_q [N];      // input registers
  logic [SHIFT_W-1:0]           shift_q;
  logic signed [BITS-1:0]       u    [HALF];
  logic signed [BITS-1:0]       v    [HALF];
  logic [HALF-1:0]              uaddr, vaddr;
  logic                         bs_load, bs_shift, acc_en, acc_first, load_out;

  // Control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      shift_q <= '0;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) fx_q[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < N; i++) fx_q[i] <= fx[i];
          shift_q <= out_shift;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(BITS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_FIN;
        default: begin // S_FIN
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign bs_load   = (state == S_LOAD);
  assign acc_en    = (state == S_RUN);
  assign bs_shift  = acc_en;
  assign acc_first = acc_en && (cnt == '0);
  assign load_out  = (state == S_FIN);

  // Butterfly: u_i = f_i + f_(7-i), v_i = f_i - f_(7-i)
  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      u[i] = BITS'(fx_q[i]) + BITS'(fx_q[N-1-i]);
      v[i] = BITS'(fx_q[i]) - BITS'(fx_q[N-1-i]);
    end
  end

  dct_bit_slice u_bit_slice (
    .clk, .rst_n, .load(bs_load), .shift(bs_shift), .din(u), .addr(uaddr)
  );
  dct_bit_slice v_bit_slice (
    .clk, .rst_n, .load(bs_load), .shift(bs_shift), .din(v), .addr(vaddr)
  );

  // Eight ROMs and shift-accumulators, one per output index x.
  for (genvar x = 0; x < N; x++) begin : g_lane
    logic signed [ROM_W-1:0] rom_data;

    dct_da_rom #(.X(x)) u_rom (
      .addr((x % 2 == 0) ? uaddr : vaddr),
      .data(rom_data)
    );

    dct_shift_acc u_acc (
      .clk, .rst_n,
      .acc_en    (acc_en),
      .first     (acc_first),
      .rom_data  (rom_data),
      .load_out  (load_out),
      .out_shift (shift_q),
      .final_data(fout[x]),
      .acc       ()
    );
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("dct1d: start while busy is ignored");

endmodule
