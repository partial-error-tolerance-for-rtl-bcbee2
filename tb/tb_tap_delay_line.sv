// tb_tap_delay_line: random samples with random stalls. A software history of
// the accepted samples gives the expected value of every tap: tap 0 is the
// current input, and tap k is the k-th accepted sample before it (zero before
// reset history). All taps are checked every clock.
module tb_tap_delay_line;
  localparam int N = 8, DEPTH = 10;
  logic clk = 1'b0;
  logic rst, en;
  logic [N-1:0] x_in;
  logic [DEPTH:0][N-1:0] taps;
  int checks = 0;
  int failures = 0;
  logic [N-1:0] hist [$];

  tap_delay_line #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; x_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int k = 0; k < DEPTH; k++) hist.push_front('0);
    for (int i = 0; i < 400; i++) begin
      en   = ($urandom % 4) != 0;
      x_in = N'($urandom);
      #1;
      for (int k = 0; k <= DEPTH; k++) begin
        checks++;
        if (taps[k] !== (k == 0 ? x_in : hist[k-1])) begin
          failures++;
          $display("FAIL i=%0d tap %0d = %h expected %h", i, k, taps[k], (k == 0 ? x_in : hist[k-1]));
        end
      end
      @(posedge clk); #1;
      if (en) begin
        hist.push_front(x_in);
        void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
