// tb_bit_plane: one bit-plane (plane 2 of the default array). Each
// transaction holds a random carry-save word from the previous plane,
// random input words and coefficient bits for KC clocks. Then the plane's
// last-row word (sum + 2*carry) must equal half the incoming word (rounded
// down: the dropped bit is the previous plane's output) plus the sum over the
// rows of x_k * c_k. Incoming words are kept small enough to fit the band.
module tb_bit_plane;
  localparam int KC = 4, M = 8, N = 8, L0 = 16, ALPHA = 1, PLANE = 2;
  logic clk = 1'b0;
  logic rst, en;
  logic [KC-1:0][N-1:0] x_taps;
  logic [KC-1:0] c_bits;
  logic [L0-1:0] s_in, c_in, s_q, c_q;
  int checks = 0;
  int failures = 0;

  bit_plane #(.KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA), .PLANE(PLANE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_v, got_v;

  initial begin
    rst = 1'b1; en = 1'b1; x_taps = '0; c_bits = '0; s_in = '0; c_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      s_in = L0'($urandom) >> 5;
      c_in = L0'($urandom) >> 5;
      if (t == 0) begin s_in = '0; c_in = '0; end
      for (int k = 0; k < KC; k++) x_taps[k] = N'($urandom);
      c_bits = KC'($urandom);
      if (t == 1) c_bits = '1;
      exp_v = (longint'(s_in) + 2 * longint'(c_in)) >> 1;
      for (int k = 0; k < KC; k++) if (c_bits[k]) exp_v += longint'(x_taps[k]);
      repeat (KC) @(posedge clk);
      #1;
      got_v = longint'(s_q) + 2 * longint'(c_q);
      checks++;
      if (got_v != exp_v) begin
        failures++;
        $display("FAIL t=%0d got %0d expected %0d", t, got_v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
