// tb_bp_array: the whole bit-plane array (default sizes) fed by a delay line
// model in the testbench, with random samples, random coefficients and random
// stalls. After every enabled clock, once M*KC samples have entered, the
// array's output word y_lo[M-2:0] + s_q*2^(M-1) + c_q*2^M is compared with the
// FIR sum computed in the testbench. The array's latency is M*KC-1 clocks: the
// word of a sample is there after the M*KC-1 enabled clocks that follow the
// clock that took it in. The output stage of the filter adds the last clock.
module tb_bp_array;
  localparam int KC = 4, M = 8, N = 8, L0 = 16, ALPHA = 1;
  localparam int R = M * KC, NTAPS = R + KC - 1;
  logic clk = 1'b0;
  logic rst, en;
  logic [NTAPS-1:0][N-1:0] x_taps;
  logic [KC-1:0][M-1:0] coef;
  logic [M-1:0] y_lo;
  logic [L0-1:0] s_q, c_q;
  int checks = 0;
  int failures = 0;

  bp_array #(.KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] xs [$];     // accepted samples, index = sample number
  logic [N-1:0] xnew;
  longint exp_v, got_v;
  int idx;

  function automatic logic [N-1:0] xat(int i);
    return (i < 0 || i >= xs.size()) ? '0 : xs[i];
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0; x_taps = '0;
    for (int j = 0; j < KC; j++) coef[j] = M'($urandom);
    coef[0] = '1;   // largest coefficient, to reach the top of the range
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 1500; t++) begin
      en = (t < 100) || ($urandom % 5 != 0);
      xnew = (t % 97 < 40) ? '1 : N'($urandom);
      // taps[k] = sample applied k enabled clocks ago; taps[0] = current.
      x_taps[0] = xnew;
      for (int k = 1; k < NTAPS; k++) x_taps[k] = xat(xs.size() - k);
      @(posedge clk); #1;
      if (en) begin
        xs.push_back(xnew);
        idx = xs.size() - R;       // sample whose result is now at the output
        if (idx >= 0) begin
          exp_v = 0;
          for (int j = 0; j < KC; j++) exp_v += longint'(coef[j]) * longint'(xat(idx - j));
          got_v = longint'(y_lo[M-2:0]) + (longint'(s_q) << (M - 1)) + (longint'(c_q) << M);
          checks++;
          if (got_v != exp_v) begin
            failures++;
            $display("FAIL sample %0d got %0d expected %0d", idx, got_v, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
