// tb_adder_subtractor: random pixel rows in both modes, every result compared
// one cycle later with cur - pred (subtract) or clamp(res + pred, 0, 255) (add)
// computed here; both clamp limits must be hit.
module tb_adder_subtractor;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, mode_add = 0, out_valid;
  logic signed [8:0] a [8], y [8];
  logic [7:0] pred [8];
  int exp_y [8];
  bit exp_v = 0;

  adder_subtractor dut (.clk, .rst_n, .in_valid, .mode_add, .a, .pred, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 600; t++) begin
      bit v, m;
      int av [8], pv [8];
      v = $urandom_range(0, 3) != 0;
      m = $urandom_range(0, 1);
      for (int k = 0; k < 8; k++) begin
        pv[k] = $urandom_range(0, 255);
        av[k] = m ? int'($urandom_range(0, 510)) - 255 : $urandom_range(0, 255);
        a[k] <= 9'(av[k]);
        pred[k] <= 8'(pv[k]);
      end
      in_valid <= v;
      mode_add <= m;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v) begin failures++; $display("valid %0d expected %0d", out_valid, v); end
      if (v) begin
        for (int k = 0; k < 8; k++) begin
          int e;
          e = m ? av[k] + pv[k] : av[k] - pv[k];
          if (m && e < 0) begin e = 0; n_lo++; end
          if (m && e > 255) begin e = 255; n_hi++; end
          checks++;
          if (int'(y[k]) != e) begin
            failures++;
            $display("mode %0d a %0d pred %0d: got %0d expected %0d", m, av[k], pv[k], y[k], e);
          end
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("clamp not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
