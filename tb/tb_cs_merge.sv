// tb_cs_merge: random carry-save words and low bits. One clock later, the
// output must be y_lo[M-2:0] + s_in * 2^(M-1) + c_in * 2^M, as an integer sum.
// The upper bits of the operands are kept clear so that the sum fits, as it
// does in the array.
module tb_cs_merge;
  localparam int M = 8, L0 = 16;
  logic clk = 1'b0;
  logic rst, en;
  logic [L0-1:0] s_in, c_in;
  logic [M-1:0] y_lo;
  logic [L0+M-1:0] y;
  int checks = 0;
  int failures = 0;

  cs_merge #(.M(M), .L0(L0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned exp_y;

  initial begin
    rst = 1'b1; en = 1'b1; s_in = '0; c_in = '0; y_lo = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      s_in = L0'($urandom) >> 2;
      c_in = L0'($urandom) >> 2;
      y_lo = M'($urandom);
      y_lo[M-1] = s_in[0];
      exp_y = longint'(y_lo[M-2:0]) + (longint'(s_in) << (M - 1)) + (longint'(c_in) << M);
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        $display("FAIL i=%0d y=%h expected %h", i, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
