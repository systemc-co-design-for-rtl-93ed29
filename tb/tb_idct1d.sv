// tb_idct1d: checks the distributed-arithmetic 8-point inverse DCT.
//  * exact check: random 15-bit inputs; expected f_i = sum_x K(i,x) F_x with
//    K(i,x) = round(2^12 C(x)/2 cos((2i+1)x pi/16)) from the cosine, rounded by
//    out_shift and saturated to 15 bits;
//  * accuracy: DCT-range inputs against the real-valued inverse, |err| <= 1;
//  * latency 20 cycles from start to done; saturation in both directions.
module tb_idct1d;
  import dct_pkg::*;

  int checks = 0, failures = 0, n_sat = 0, n_neg = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [14:0] fx [8];
  logic [4:0] out_shift = 5'd12;
  logic busy, done;
  logic signed [14:0] fout [8];

  idct1d dut (.clk, .rst_n, .start, .fx, .out_shift, .busy, .done, .fout);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cosc(int i, int x);
    real c;
    c = (x == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return (c / 2.0) * $cos((2 * i + 1) * x * 3.14159265358979 / 16.0);
  endfunction

  function automatic longint kint(int i, int x);
    return longint'($rtoi($floor(2.0 * cosc(i, x) * 2048.0 + 0.5)));
  endfunction

  task automatic run(input int f [8], input int s, input bit real_check);
    int cyc;
    for (int i = 0; i < 8; i++) fx[i] <= 15'(f[i]);
    out_shift <= 5'(s);
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; i < 8; i++) fx[i] <= 15'($urandom);
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!done && cyc < 100);
    checks++;
    if (cyc != 20) begin
      failures++;
      $display("latency %0d, expected 20", cyc);
    end
    #1;
    for (int i = 0; i < 8; i++) begin
      longint acc, r;
      real fr;
      acc = 0;
      fr = 0.0;
      for (int x = 0; x < 8; x++) begin
        acc += kint(i, x) * f[x];
        fr  += cosc(i, x) * f[x];
      end
      r = (acc + (longint'(1) << (s - 1))) >>> s;
      if (r > 16383 || r < -16384) n_sat++;
      if (r < 0) n_neg++;
      if (r > 16383) r = 16383;
      if (r < -16384) r = -16384;
      checks++;
      if (longint'(fout[i]) != r) begin
        failures++;
        $display("f%0d: got %0d expected %0d", i, fout[i], r);
      end
      if (real_check) begin
        checks++;
        if (real'(fout[i]) - fr > 1.0 || fr - real'(fout[i]) > 1.0) begin
          failures++;
          $display("f%0d: got %0d, real IDCT %f", i, fout[i], fr);
        end
      end
    end
  endtask

  initial begin
    int f [8];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 8; i++) f[i] = int'($urandom_range(0, 32767)) - 16384;
      run(f, $urandom_range(9, 16), 0);
    end
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 8; i++) f[i] = int'($urandom_range(0, 600)) - 300;
      run(f, 12, 1);
    end
    for (int i = 0; i < 8; i++) f[i] = (i % 2 == 0) ? 16383 : 0;
    run(f, 12, 0);
    for (int i = 0; i < 8; i++) f[i] = (i % 2 == 0) ? -16384 : 0;
    run(f, 12, 0);
    checks++;
    if (n_sat < 2 || n_neg == 0) begin
      failures++;
      $display("saturation %0d / negative results %0d not exercised", n_sat, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
