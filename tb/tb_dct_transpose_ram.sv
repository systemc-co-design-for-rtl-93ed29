// tb_dct_transpose_ram: writes an 8x8 block by rows, reads it by rows and by
// columns, overwrites some columns, and checks every word against a model array.
module tb_dct_transpose_ram;
  import dct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, we = 0, wr_col = 0, rd_col = 0;
  logic [2:0] wr_idx = '0, rd_idx = '0;
  logic signed [14:0] wdata [8];
  logic signed [14:0] rdata [8];
  logic signed [14:0] model [8][8];

  dct_transpose_ram dut (.clk, .we, .wr_col, .wr_idx, .wdata, .rd_col, .rd_idx, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input bit col, input int idx);
    wr_col <= col;
    wr_idx <= 3'(idx);
    for (int k = 0; k < 8; k++) begin
      logic signed [14:0] w;
      w = 15'($urandom);
      wdata[k] <= w;
      if (col) model[k][idx] = w; else model[idx][k] = w;
    end
    we <= 1;
    @(posedge clk);
  endtask

  task automatic check_all(input bit col);
    for (int idx = 0; idx < 8; idx++) begin
      rd_col = col;
      rd_idx = 3'(idx);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rdata[k] != (col ? model[k][idx] : model[idx][k])) begin
          failures++;
          $display("read col=%0d idx %0d k %0d: got %0d expected %0d", col, idx, k, rdata[k],
                   col ? model[k][idx] : model[idx][k]);
        end
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int r = 0; r < 8; r++) write(0, r);
    we <= 0;
    #1; check_all(0); check_all(1);
    for (int c = 0; c < 8; c += 2) write(1, c);
    we <= 0;
    #1; check_all(0); check_all(1);
    for (int r = 0; r < 8; r++) write($urandom_range(0, 1), $urandom_range(0, 7));
    we <= 0;
    #1; check_all(0); check_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
