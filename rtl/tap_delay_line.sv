// tap_delay_line: shift register of input words with one tap per delay.
//
// taps[0] is the word on x_in in the current cycle (combinational). taps[k],
// for k >= 1, is the word that was on x_in k enabled cycles earlier. The line
// advances only when en is high, so a low en stalls it together with the
// array. Reset clears it to zero, which makes x_i = 0 for samples before the
// first one.
// The rows of the array read this line to get the delayed samples x_(i-j) of
// the FIR sum. The text does not say how the delayed samples reach the rows,
// so this shared line is this design's choice.
module tap_delay_line #(
  parameter int N     = 8,
  parameter int DEPTH = 34    // registers; taps 0..DEPTH
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [N-1:0]          x_in,
  output logic [DEPTH:0][N-1:0] taps
);
  logic [N-1:0] line [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) line[k] <= '0;
    end else if (en) begin
      line[0] <= x_in;
      for (int k = 1; k < DEPTH; k++) line[k] <= line[k-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k <= DEPTH; k++) taps[k] = line[k-1];
  end
endmodule
