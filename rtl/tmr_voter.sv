// tmr_voter: bitwise 2-out-of-3 majority voter for triple modular redundancy.
//
// Each output bit is the majority of the three copies' bits, so a fault in any
// one copy is masked. The voter itself is not replicated. Combinational.
// mismatch goes high when the copies disagree anywhere. It is an observation
// output added by this design; the cells leave it unconnected.
module tmr_voter #(
  parameter int WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic             mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
