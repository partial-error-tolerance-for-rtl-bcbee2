// cs_merge: output stage that turns the last row's carry-save word into the
// filter output.
//
// The array's last row leaves a sum vector s_in (s_in[l] has weight M-1+l)
// and a carry vector c_in (c_in[l] has weight M+l). Bit s_in[0] is already
// final: it is output bit M-1. A carry-propagate adder adds the rest of the
// two vectors into the upper L0 output bits, weights M..M+L0-1. Bits 0..M-2
// come from y_lo. The full word is registered, which gives one clock of
// latency.
// The text names the output bits but not the circuit that forms them. The
// plain adder and the output register are this design's choices. The stage is
// not triplicated.
module cs_merge #(
  parameter int M  = 8,
  parameter int L0 = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [L0-1:0]    s_in,
  input  logic [L0-1:0]    c_in,
  input  logic [M-1:0]     y_lo,     // bit M-1 unused: s_in[0] carries it
  output logic [L0+M-1:0]  y
);
  logic [L0-1:0]   hi;
  logic [L0+M-1:0] y_d;

  always_comb begin
    hi  = {1'b0, s_in[L0-1:1]} + c_in;
    y_d = {hi, s_in[0], y_lo[M-2:0]};
  end

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= y_d;
  end
endmodule
