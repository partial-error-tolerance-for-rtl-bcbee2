// bp_row: one row of the bit-plane array, L0 basic cells wide.
//
// The row adds the partial product x * c_bit (one coefficient bit) to the
// carry-save word that comes from the row above. Local cell l has the weight
// of input bit l of x. Cells l >= N get a zero product bit and only move the
// accumulated upper bits along. Each cell is a plain bp_cell, or a
// triplicated tmr_cell when pet_pkg::in_pet() puts the cell (ROW, l) inside
// P_ET(ALPHA). That choice is made once, at elaboration.
//
// Interface: s_in[l] and c_in[l] are the sum and carry bits that arrive at
// local weight l. The caller aligns them. s_q[l] is the registered sum at
// weight l, and c_q[l] is the registered carry out of cell l, at weight l+1.
// The carry out of the top cell, c_q[L0-1], has no cell to go to inside the
// same bit-plane. Its value is always zero when L0 >= N + 1 + log2(KC): the
// accumulated word of a plane stays below 2*KC*2^N, and a carry out of the
// top cell would need a word of at least 2^L0.
// Latency: one clock.
module bp_row #(
  parameter int KC    = 4,
  parameter int M     = 8,
  parameter int N     = 8,
  parameter int L0    = 16,
  parameter int ALPHA = 1,
  parameter int ROW   = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [N-1:0]  x,
  input  logic          c_bit,
  input  logic [L0-1:0] s_in,
  input  logic [L0-1:0] c_in,
  output logic [L0-1:0] s_q,
  output logic [L0-1:0] c_q
);
  logic [L0-1:0] x_ext;

  always_comb begin
    x_ext = '0;
    x_ext[N-1:0] = x;
  end

  for (genvar l = 0; l < L0; l++) begin : g_col
    if (pet_pkg::in_pet(ROW, l, ALPHA, KC, M, L0)) begin : g_ft
      tmr_cell u_cell (
        .clk(clk), .rst(rst), .en(en),
        .x_bit(x_ext[l]), .c_bit(c_bit),
        .s_in(s_in[l]), .c_in(c_in[l]),
        .s_q(s_q[l]), .c_q(c_q[l])
      );
    end else begin : g_plain
      bp_cell u_cell (
        .clk(clk), .rst(rst), .en(en),
        .x_bit(x_ext[l]), .c_bit(c_bit),
        .s_in(s_in[l]), .c_in(c_in[l]),
        .s_q(s_q[l]), .c_q(c_q[l])
      );
    end
  end
endmodule
