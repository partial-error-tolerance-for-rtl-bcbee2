// fir_stream_check: testbench helper that drives one pet_bp_fir instance of
// the given sizes with a random sample stream (random stalls, bursts of
// all-ones samples, all-ones first coefficient). It checks every result and
// y_valid against a behavioural FIR sum. It reports its counts and raises
// done when its NSAMP samples are through.
module fir_stream_check #(
  parameter int KC    = 4,
  parameter int M     = 8,
  parameter int N     = 8,
  parameter int L0    = 16,
  parameter int ALPHA = 1,
  parameter int NSAMP = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int R = KC * M, W = L0 + M;

  logic                 in_valid;
  logic [N-1:0]         x_in;
  logic [KC-1:0][M-1:0] coef;
  logic                 y_valid;
  logic [W-1:0]         y;

  pet_bp_fir #(.KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA)) dut (.*);

  logic [N-1:0] xs [$];
  int nout;

  function automatic longint fir_ref(int i);
    longint s = 0;
    for (int j = 0; j < KC; j++)
      if (i - j >= 0) s += longint'(coef[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  initial begin
    logic exp_valid;
    checks = 0; failures = 0; done = 1'b0; nout = 0;
    in_valid = 1'b0; x_in = '0;
    for (int j = 0; j < KC; j++) coef[j] = M'($urandom);
    coef[0] = '1;
    @(negedge rst);
    @(negedge clk);
    while (nout < NSAMP) begin
      in_valid = ($urandom % 5) != 0;
      x_in = (xs.size() % 50 < 8) ? '1 : N'({$urandom, $urandom});
      @(posedge clk); #1;
      exp_valid = 1'b0;
      if (in_valid) begin
        xs.push_back(x_in);
        exp_valid = xs.size() > R;
      end
      checks++;
      if (y_valid !== exp_valid) begin
        failures++;
        $display("FAIL N=%0d L0=%0d ALPHA=%0d: y_valid", N, L0, ALPHA);
      end
      if (y_valid && exp_valid) begin
        checks++;
        if (longint'(y) != fir_ref(nout)) begin
          failures++;
          $display("FAIL N=%0d L0=%0d ALPHA=%0d sample %0d: got %0d expected %0d",
                   N, L0, ALPHA, nout, y, fir_ref(nout));
        end
        nout++;
      end
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
