// bp_cell: basic cell of the bit-plane FIR array.
//
// Multiplies one input-word bit by one coefficient bit (an AND gate). It adds
// that product to the sum bit and the carry bit that arrive from the row above,
// using a full adder. The new sum and carry are registered, so a word moves
// down one row per clock. The sum keeps the cell's weight. The carry has the
// next higher weight and enters the next row one position to the left. This
// is the carry-save form of the row-to-row multiply-accumulate.
//
// Timing: s_q/c_q change on the rising clock edge when en is high. rst (sync,
// active high) clears them.
// The multiply-accumulate function follows the source architecture. The
// full-adder/carry-save insides, the reset and the enable are this design's
// choices.
module bp_cell (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic x_bit,   // input word bit
  input  logic c_bit,   // coefficient bit
  input  logic s_in,    // sum bit from the row above, same weight
  input  logic c_in,    // carry bit from the row above (weight-1 cell)
  output logic s_q,     // registered sum, same weight
  output logic c_q      // registered carry, weight + 1
);
  logic pp;
  logic s_d;
  logic c_d;

  always_comb begin
    pp  = x_bit & c_bit;
    s_d = pp ^ s_in ^ c_in;
    c_d = (pp & s_in) | (pp & c_in) | (s_in & c_in);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q <= 1'b0;
      c_q <= 1'b0;
    end else if (en) begin
      s_q <= s_d;
      c_q <= c_d;
    end
  end
endmodule
