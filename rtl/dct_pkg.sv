// dct_pkg: widths, coefficient constants and the ROM-content function shared by
// the distributed-arithmetic (DA) 8-point DCT and the 8x8 2D DCT built on it.
// It also holds the zig-zag scan, the default quantisation table and the
// Huffman tables of the codec stages around the transform.
//
// Fixed-point conventions
//  * A 1D word (input f_i and output F_x) is a signed 15-bit integer.
//  * The butterfly sums u_i = f_i + f_(7-i) and differences v_i = f_i - f_(7-i)
//    need one more bit: B = 16 bits, processed one bit-plane per clock.
//  * A ROM word is a signed 4.11 fixed-point number of 15 bits (4 integer bits
//    including sign, 11 fraction bits). As in the published ROM0 contents
//    (0x05a8 = 0.707107 for one set address bit), a ROM entry holds twice the
//    DCT coefficient C_(i,x), so the accumulated sum carries 12 fraction bits
//    relative to the true F_x. The output stage removes them by a rounding shift.
//  * The coefficient magnitudes A..G are the seven distinct magnitudes of the 8-point DCT matrix
//    (C_(i,x) = C(x)/2 * cos((2i+1)x*pi/16)), stored here as round(2*K*2^11).
package dct_pkg;

  localparam int unsigned N        = 8;            // points per 1D transform
  localparam int unsigned HALF     = N / 2;        // u / v values per half
  localparam int unsigned WORD_W   = 15;           // 1D input/output word
  localparam int unsigned BITS     = WORD_W + 1;   // B: bit-planes of u_i / v_i
  localparam int unsigned ROM_W    = 15;           // 4.11 ROM word
  localparam int unsigned ROM_FRAC = 11;
  localparam int unsigned COEF_FRAC = ROM_FRAC + 1;  // ROM words hold 2*C: 12 fraction bits
  localparam int unsigned ACC_W    = ROM_W + BITS; // exact accumulator width
  localparam int unsigned SHIFT_W  = 5;            // width of the output shift amount

  // Coefficient magnitudes A..G in 4.11, doubled (see above):
  // A=0.353553 B=0.490393 C=0.415735 D=0.277785 E=0.097545 F=0.461940 G=0.191342
  typedef enum logic [2:0] {K_A, K_B, K_C, K_D, K_E, K_F, K_G} coef_e;

  function automatic int coef_mag(coef_e k);
    case (k)
      K_A: return 1448;
      K_B: return 2009;
      K_C: return 1703;
      K_D: return 1138;
      K_E: return 400;
      K_F: return 1892;
      default: return 784; // K_G
    endcase
  endfunction

  // C_(i,x) for i = 0..3 (the other half follows from the even/odd symmetry),
  // signed, in doubled 4.11, for rows x = 0..7 of the DCT matrix.
  function automatic int coef(int unsigned i, int unsigned x);
    int s;
    coef_e k;
    s = 1;
    k = K_A;
    case (x)
      0: k = K_A;
      1: case (i) 0: k = K_B; 1: k = K_C; 2: k = K_D; default: k = K_E; endcase
      2: begin
           case (i) 0, 3: k = K_F; default: k = K_G; endcase
           if (i >= 2) s = -1;
         end
      3: begin
           case (i) 0: k = K_C; 1: k = K_E; 2: k = K_B; default: k = K_D; endcase
           if (i != 0) s = -1;
         end
      4: begin
           k = K_A;
           if (i == 1 || i == 2) s = -1;
         end
      5: begin
           case (i) 0: k = K_D; 1: k = K_B; 2: k = K_E; default: k = K_C; endcase
           if (i == 1) s = -1;
         end
      6: begin
           case (i) 0, 3: k = K_G; default: k = K_F; endcase
           if (i == 1 || i == 3) s = -1;
         end
      default: begin // x = 7
           case (i) 0: k = K_E; 1: k = K_D; 2: k = K_C; default: k = K_B; endcase
           if (i == 1 || i == 3) s = -1;
         end
    endcase
    return s * coef_mag(k);
  endfunction

  // ROM entry D_x(addr) = sum over set address bits i of C_(i,x).
  // Address bit i carries the current bit-plane of u_i (even x) or v_i (odd x).
  function automatic logic signed [ROM_W-1:0] rom_entry(int unsigned x, logic [HALF-1:0] addr);
    int sum;
    sum = 0;
    for (int unsigned i = 0; i < HALF; i++)
      if (addr[i]) sum += coef(i, x);
    return ROM_W'(sum);
  endfunction

  // IDCT ROM entry for output sample i (0..3): sum over set address bits k of
  // C_(i,2k) (even part, odd=0) or C_(i,2k+1) (odd part, odd=1).
  function automatic logic signed [ROM_W-1:0] idct_rom_entry(int unsigned i, bit odd,
                                                              logic [HALF-1:0] addr);
    int sum;
    sum = 0;
    for (int unsigned k = 0; k < HALF; k++)
      if (addr[k]) sum += coef(i, 2 * k + (odd ? 1 : 0));
    return ROM_W'(sum);
  endfunction

  // Zig-zag scan: entry n (0..63) of the table is the raster index
  // 8*row + column of scan position n. Anti-diagonals s = row + column are
  // walked in turn, upwards (row falling) for even s and downwards for odd s.
  typedef logic [5:0] scan_t [64];

  function automatic scan_t zigzag_table();
    scan_t       tbl;
    int unsigned cnt;
    cnt = 0;
    for (int s = 0; s < 2 * N - 1; s++) begin
      for (int t = 0; t < N; t++) begin
        int r;
        r = (s % 2 == 0) ? ((s < N ? s : N - 1) - t) : ((s < N ? 0 : s - (N - 1)) + t);
        if (r >= 0 && r < N && s - r >= 0 && s - r < N) begin
          tbl[cnt] = 6'(r * N + (s - r));
          cnt++;
        end
      end
    end
    return tbl;
  endfunction

  localparam scan_t ZIGZAG = zigzag_table();

  // Quantiser step sizes loaded at reset: the example luminance table of the
  // JPEG standard (ITU-T T.81, Annex K), raster order. Run-time loadable.
  localparam logic [7:0] QTABLE_DEFAULT [64] = '{
    8'd16, 8'd11, 8'd10, 8'd16, 8'd24,  8'd40,  8'd51,  8'd61,
    8'd12, 8'd12, 8'd14, 8'd19, 8'd26,  8'd58,  8'd60,  8'd55,
    8'd14, 8'd13, 8'd16, 8'd24, 8'd40,  8'd57,  8'd69,  8'd56,
    8'd14, 8'd17, 8'd22, 8'd29, 8'd51,  8'd87,  8'd80,  8'd62,
    8'd18, 8'd22, 8'd37, 8'd56, 8'd68,  8'd109, 8'd103, 8'd77,
    8'd24, 8'd35, 8'd55, 8'd64, 8'd81,  8'd104, 8'd113, 8'd92,
    8'd49, 8'd64, 8'd78, 8'd87, 8'd103, 8'd121, 8'd120, 8'd101,
    8'd72, 8'd92, 8'd95, 8'd98, 8'd112, 8'd100, 8'd103, 8'd99
  };

  // ---- Entropy coding -------------------------------------------------------
  // Huffman tables of the run-length entropy coder, given in the usual compact
  // form: *_BITS[L-1] is the number of codes of length L (1..16) and *_VALS the
  // symbols in order of increasing code. Codes are canonical: the first code of
  // length L is (last code of length L-1, plus 1) shifted left by one. The
  // tables are the example luminance tables of the JPEG standard. A DC symbol is
  // a size category (0..11); an AC symbol is {run of zeros, size}, with 8'h00 =
  // end of block (EOB) and 8'hF0 = sixteen zeros (ZRL).
  localparam int unsigned HUFF_LEN = 16;         // longest code
  localparam int unsigned DC_NSYM  = 12;
  localparam int unsigned AC_NSYM  = 162;
  localparam int unsigned DC_MAX_SIZE = 11;      // largest DC size category
  localparam int unsigned AC_MAX_SIZE = 10;      // largest AC size category

  typedef logic [7:0] huff_bits_t [HUFF_LEN];

  localparam huff_bits_t DC_BITS = '{8'd0, 8'd1, 8'd5, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1,
                                     8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam logic [7:0] DC_VALS [DC_NSYM] = '{8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5,
                                               8'd6, 8'd7, 8'd8, 8'd9, 8'd10, 8'd11};
  localparam huff_bits_t AC_BITS = '{8'd0, 8'd2, 8'd1, 8'd3, 8'd3, 8'd2, 8'd4, 8'd3,
                                     8'd5, 8'd5, 8'd4, 8'd4, 8'd0, 8'd0, 8'd1, 8'd125};
  localparam logic [7:0] AC_VALS [AC_NSYM] = '{
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31, 8'h41, 8'h06,
    8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08,
    8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0, 8'h24, 8'h33, 8'h62, 8'h72,
    8'h82, 8'h09, 8'h0a, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28,
    8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45,
    8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59,
    8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74, 8'h75,
    8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89,
    8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3,
    8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6,
    8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9,
    8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2,
    8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4,
    8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa
  };

  // Per code length: first (smallest) code, and index of its symbol in *_VALS.
  typedef logic [HUFF_LEN-1:0] huff_first_t [HUFF_LEN];
  typedef logic [7:0]          huff_index_t [HUFF_LEN];

  function automatic huff_first_t huff_first(huff_bits_t bits);
    logic [HUFF_LEN:0] code;
    code = '0;
    for (int l = 0; l < HUFF_LEN; l++) begin
      huff_first[l] = code[HUFF_LEN-1:0];
      code = (code + (HUFF_LEN+1)'(bits[l])) << 1;
    end
  endfunction

  function automatic huff_index_t huff_index(huff_bits_t bits);
    int unsigned k;
    k = 0;
    for (int l = 0; l < HUFF_LEN; l++) begin
      huff_index[l] = 8'(k);
      k += int'(bits[l]);
    end
  endfunction

  localparam huff_first_t DC_FIRST = huff_first(DC_BITS);
  localparam huff_first_t AC_FIRST = huff_first(AC_BITS);
  localparam huff_index_t DC_INDEX = huff_index(DC_BITS);
  localparam huff_index_t AC_INDEX = huff_index(AC_BITS);

  // Code of every symbol, for the encoder: {code (16 bits, right-aligned),
  // length (5 bits)}; length 0 marks an unused symbol.
  typedef logic [HUFF_LEN+4:0] huff_code_t;
  typedef huff_code_t huff_dc_tab_t [DC_NSYM];
  typedef huff_code_t huff_ac_tab_t [256];

  function automatic huff_dc_tab_t huff_dc_table();
    int unsigned k;
    k = 0;
    for (int s = 0; s < DC_NSYM; s++) huff_dc_table[s] = '0;
    for (int l = 0; l < HUFF_LEN; l++)
      for (int j = 0; j < int'(DC_BITS[l]); j++) begin
        huff_dc_table[4'(DC_VALS[k])] = {DC_FIRST[l] + HUFF_LEN'(j), 5'(l + 1)};
        k++;
      end
  endfunction

  function automatic huff_ac_tab_t huff_ac_table();
    int unsigned k;
    k = 0;
    for (int s = 0; s < 256; s++) huff_ac_table[s] = '0;
    for (int l = 0; l < HUFF_LEN; l++)
      for (int j = 0; j < int'(AC_BITS[l]); j++) begin
        huff_ac_table[AC_VALS[k]] = {AC_FIRST[l] + HUFF_LEN'(j), 5'(l + 1)};
        k++;
      end
  endfunction

  localparam huff_dc_tab_t DC_CODE = huff_dc_table();
  localparam huff_ac_tab_t AC_CODE = huff_ac_table();

  // Size category of a value: number of bits of |v| (0 for v = 0).
  function automatic logic [3:0] size_cat(logic signed [WORD_W-1:0] v);
    logic [WORD_W-1:0] m;
    m = v[WORD_W-1] ? WORD_W'(-v) : WORD_W'(v);
    size_cat = '0;
    for (int b = 0; b < WORD_W; b++) if (m[b]) size_cat = 4'(b + 1);
  endfunction

endpackage
