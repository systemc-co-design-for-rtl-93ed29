// dct_transpose_ram: 8x8 transposition memory between the two 1D-DCT passes.
//
// An 8x8 array of W-bit words that is written and read a whole row or a whole
// column at a time, chosen per access by 'wr_col' / 'rd_col'. Writing rows and
// reading columns (or the reverse) transposes the block. The source article leaves
// the word width n to the area budget; 15 bits, the 1D-DCT word, is used here.
//
// Interface: when 'we' is high the eight words wdata[k] go to element k of row
// (wr_col=0) or column (wr_col=1) 'wr_idx' at the clock edge. rdata[k] is
// element k of row or column 'rd_idx', read combinationally (register-file
// style, a choice of this design), so a word written at an edge is readable in
// the next cycle.
module dct_transpose_ram
  import dct_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic                   wr_col,
  input  logic [2:0]             wr_idx,
  input  logic signed [W-1:0]    wdata [N],
  input  logic                   rd_col,
  input  logic [2:0]             rd_idx,
  output logic signed [W-1:0]    rdata [N]
);

  logic signed [W-1:0] mem [N][N];   // mem[row][column]

  // Element (r, c) is written when its row (row access) or its column (column
  // access) is addressed; it takes word c of a row or word r of a column.
  always_ff @(posedge clk) begin
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        if (we && (wr_col ? (wr_idx == 3'(c)) : (wr_idx == 3'(r))))
          mem[r][c] <= wr_col ? wdata[r] : wdata[c];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++)
      rdata[k] = rd_col ? mem[k][rd_idx] : mem[rd_idx][k];
  end

endmodule
