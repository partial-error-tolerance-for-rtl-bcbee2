// tmr_cell: fault-tolerant version of bp_cell, by triple modular redundancy.
//
// Three independent bp_cell copies get the same inputs, and each has its own
// sum and carry registers. A tmr_voter takes the majority of the three
// registered (sum, carry) pairs, so one faulty copy does not show at the
// outputs. The ports and timing are the same as bp_cell's: one clock from
// input to output. The text only says that a marked cell is triplicated; one
// voter per cell, placed after the copies' registers, is this design's choice.
module tmr_cell (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic x_bit,
  input  logic c_bit,
  input  logic s_in,
  input  logic c_in,
  output logic s_q,
  output logic c_q
);
  logic [1:0] cp [3];   // {carry, sum} of each copy
  logic       mismatch_unused;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    bp_cell u_cell (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .x_bit(x_bit),
      .c_bit(c_bit),
      .s_in (s_in),
      .c_in (c_in),
      .s_q  (cp[k][0]),
      .c_q  (cp[k][1])
    );
  end

  tmr_voter #(.WIDTH(2)) u_vote (
    .a       (cp[0]),
    .b       (cp[1]),
    .c       (cp[2]),
    .y       ({c_q, s_q}),
    .mismatch(mismatch_unused)
  );
endmodule
