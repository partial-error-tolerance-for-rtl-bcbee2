// tb_bp_cell: exhaustive check of the basic cell. Every combination of the
// four data inputs is applied. The registered sum and carry are compared
// with the arithmetic x*c + s_in + c_in one clock later. Also checked: the
// enable holds the registers, and reset clears them.
module tb_bp_cell;
  logic clk = 1'b0;
  logic rst, en, x_bit, c_bit, s_in, c_in, s_q, c_q;
  int checks = 0;
  int failures = 0;

  bp_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    rst = 1'b1; en = 1'b0; x_bit = 0; c_bit = 0; s_in = 0; c_in = 0;
    @(posedge clk); #1;
    rst = 1'b0; en = 1'b1;
    for (int v = 0; v < 16; v++) begin
      {x_bit, c_bit, s_in, c_in} = 4'(v);
      total = (x_bit && c_bit ? 1 : 0) + int'(s_in) + int'(c_in);
      @(posedge clk); #1;
      checks++;
      if ({c_q, s_q} != 2'(total)) begin
        failures++;
        $display("FAIL v=%0d got %b%b expected %0d", v, c_q, s_q, total);
      end
    end
    // 1+1+1 = 3 is held while en is low, then cleared by reset.
    {x_bit, c_bit, s_in, c_in} = 4'b1111;
    @(posedge clk); #1;
    en = 1'b0;
    {x_bit, c_bit, s_in, c_in} = 4'b0000;
    repeat (3) @(posedge clk); #1;
    checks++;
    if ({c_q, s_q} != 2'b11) begin failures++; $display("FAIL hold"); end
    rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if ({c_q, s_q} != 2'b00) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
