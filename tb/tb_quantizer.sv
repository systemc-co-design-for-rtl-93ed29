// tb_quantizer: random coefficient rows through the quantiser with random input
// gaps and output back-pressure, first with the reset table (checked against
// the JPEG example luminance table written out here), then after rewriting
// entries (including a zero step, treated as 1). Every output is compared with
// sign(F) * floor((|F| + Q/2) / Q) computed here.
module tb_quantizer;
  import dct_pkg::*;

  int checks = 0, failures = 0, n_stall = 0, n_zero = 0, n_neg = 0;
  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [5:0] tbl_addr = '0;
  logic [7:0] tbl_data = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [2:0] in_row = '0, out_row;
  logic signed [14:0] in_coef [8], out_q [8];

  quantizer dut (.clk, .rst_n, .tbl_we, .tbl_addr, .tbl_data, .in_valid, .in_ready, .in_row,
                 .in_coef, .out_valid, .out_ready, .out_row, .out_q);

  always #5 clk = ~clk;

  int qt [64] = '{16, 11, 10, 16, 24, 40, 51, 61, 12, 12, 14, 19, 26, 58, 60, 55,
                  14, 13, 16, 24, 40, 57, 69, 56, 14, 17, 22, 29, 51, 87, 80, 62,
                  18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
                  49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};

  typedef struct { int row; int c [8]; } row_t;
  row_t sent [$];
  bit   phase2 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qref(int f, int q);
    int m;
    if (q == 0) q = 1;
    m = f < 0 ? -f : f;
    m = (m + q / 2) / q;
    return f < 0 ? -m : m;
  endfunction

  // output side
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      row_t r;
      r = sent.pop_front();
      checks++;
      if (out_row != 3'(r.row)) begin failures++; $display("row %0d expected %0d", out_row, r.row); end
      for (int k = 0; k < 8; k++) begin
        int e;
        e = qref(r.c[k], qt[r.row * 8 + k]);
        if (e == 0) n_zero++;
        if (e < 0) n_neg++;
        checks++;
        if (int'(out_q[k]) != e) begin
          failures++;
          $display("row %0d col %0d F=%0d: got %0d expected %0d", r.row, k, r.c[k], out_q[k], e);
        end
      end
    end
    if (out_valid && !out_ready) n_stall++;
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic send_rows(input int n);
    int sent_n;
    sent_n = 0;
    while (sent_n < n) begin
      if ($urandom_range(0, 4) != 0) begin
        row_t r;
        r.row = $urandom_range(0, 7);
        for (int k = 0; k < 8; k++) begin
          r.c[k] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 32767)) - 16384
                                              : int'($urandom_range(0, 400)) - 200;
          in_coef[k] <= 15'(r.c[k]);
        end
        in_row   <= 3'(r.row);
        in_valid <= 1;
        do @(posedge clk); while (!in_ready);
        sent.push_back(r);
        sent_n++;
      end else begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_rows(300);
    while (sent.size() != 0) @(posedge clk);
    for (int a = 0; a < 64; a++) begin
      qt[a] = (a == 5) ? 0 : $urandom_range(1, 255);
      tbl_we   <= 1;
      tbl_addr <= 6'(a);
      tbl_data <= 8'(qt[a]);
      @(posedge clk);
    end
    tbl_we <= 0;
    send_rows(300);
    while (sent.size() != 0) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_zero == 0 || n_neg == 0) begin
      failures++;
      $display("not exercised: stalls %0d zeros %0d negatives %0d", n_stall, n_zero, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
