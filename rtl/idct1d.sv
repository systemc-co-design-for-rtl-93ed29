// idct1d: 8-point inverse DCT by distributed arithmetic.
//
// f_i = sum_x C_(i,x) F_x. Two bit-slice units present one bit-plane per clock,
// sign plane first, of the even inputs F_0, F_2, F_4, F_6 and of the odd inputs
// F_1, F_3, F_5, F_7. Eight ROMs (idct_da_rom) turn them into the partial sums
// of e_0..e_3 (even part) and o_0..o_3 (odd part); eight shift-accumulators
// (dct_shift_acc) build the exact e_i and o_i in B = 16 cycles. An output
// butterfly forms f_i = e_i + o_i and f_(7-i) = e_i - o_i, which are rounded by
// 'out_shift' fraction bits and saturated to 15 bits into the output registers.
//
// The source article only names the inverse transform (2D-IDCT of the decoder). This
// unit reuses the forward unit's bit-slice, ROM format, shift-accumulator and
// control, with the butterfly moved from the input to the output: that
// structure, and the numbers below, are this design's choices.
//
// Interface and timing are those of dct1d: pulse 'start' while 'busy' is low
// with fx[] = F_0..F_7; 'done' pulses 20 cycles later with fout[i] = f_i.
// 'out_shift' = 12 gives integer samples.
module idct1d
  import dct_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [WORD_W-1:0]  fx   [N],   // F_0 .. F_7
  input  logic [SHIFT_W-1:0]        out_shift,
  output logic                      busy,
  output logic                      done,
  output logic signed [WORD_W-1:0]  fout [N]    // f_0 .. f_7
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_FIN} state_e;

  localparam logic signed [ACC_W:0] OUT_MAX = (ACC_W+1)'((1 <<< (WORD_W-1)) - 1);
  localparam logic signed [ACC_W:0] OUT_MIN = -(ACC_W+1)'(1 <<< (WORD_W-1));

  state_e                       state;
  logic [$clog2(BITS)-1:0]      cnt;
  logic signed [WORD_W-1:0]     fx_q [N];
  logic [SHIFT_W-1:0]           shift_q;
  logic signed [BITS-1:0]       ev   [HALF];
  logic signed [BITS-1:0]       od   [HALF];
  logic [HALF-1:0]              eaddr, oaddr;
  logic                         bs_load, acc_en, acc_first;
  logic signed [ACC_W-1:0]      e_acc [HALF];
  logic signed [ACC_W-1:0]      o_acc [HALF];

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
        default: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign bs_load   = (state == S_LOAD);
  assign acc_en    = (state == S_RUN);
  assign acc_first = acc_en && (cnt == '0);

  // Even and odd input sets, sign-extended to B bits.
  always_comb begin
    for (int k = 0; k < HALF; k++) begin
      ev[k] = BITS'(fx_q[2 * k]);
      od[k] = BITS'(fx_q[2 * k + 1]);
    end
  end

  dct_bit_slice e_bit_slice (
    .clk, .rst_n, .load(bs_load), .shift(acc_en), .din(ev), .addr(eaddr)
  );
  dct_bit_slice o_bit_slice (
    .clk, .rst_n, .load(bs_load), .shift(acc_en), .din(od), .addr(oaddr)
  );

  for (genvar i = 0; i < HALF; i++) begin : g_lane
    logic signed [ROM_W-1:0] e_rom, o_rom;

    idct_da_rom #(.I(i), .ODD(1'b0)) u_erom (.addr(eaddr), .data(e_rom));
    idct_da_rom #(.I(i), .ODD(1'b1)) u_orom (.addr(oaddr), .data(o_rom));

    dct_shift_acc u_eacc (
      .clk, .rst_n, .acc_en(acc_en), .first(acc_first), .rom_data(e_rom),
      .load_out(1'b0), .out_shift(shift_q), .final_data(), .acc(e_acc[i])
    );
    dct_shift_acc u_oacc (
      .clk, .rst_n, .acc_en(acc_en), .first(acc_first), .rom_data(o_rom),
      .load_out(1'b0), .out_shift(shift_q), .final_data(), .acc(o_acc[i])
    );
  end

  // Output butterfly, rounding and saturation.
  function automatic logic signed [WORD_W-1:0] round_sat(logic signed [ACC_W:0] v,
                                                         logic [SHIFT_W-1:0] s);
    logic signed [ACC_W:0] r;
    r = (v + ((ACC_W+1)'(1) <<< (s - 1))) >>> s;
    if (r > OUT_MAX) return OUT_MAX[WORD_W-1:0];
    if (r < OUT_MIN) return OUT_MIN[WORD_W-1:0];
    return r[WORD_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) fout[i] <= '0;
    end else if (state == S_FIN) begin
      for (int i = 0; i < HALF; i++) begin
        fout[i]       <= round_sat((ACC_W+1)'(e_acc[i]) + (ACC_W+1)'(o_acc[i]), shift_q);
        fout[N-1-i]   <= round_sat((ACC_W+1)'(e_acc[i]) - (ACC_W+1)'(o_acc[i]), shift_q);
      end
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("idct1d: start while busy is ignored");

endmodule
