// bit_plane: one bit-plane (BP) of the array, made of KC rows.
//
// Plane b handles bit b of every coefficient. Its row k adds x_(i-k) * c_k^b
// to the carry-save word. The word enters from the previous plane shifted
// right by one position (a multiply by 1/2). Weights are therefore re-based:
// the previous plane's local weight l+1 becomes local weight l here. The
// previous plane's local bit 0 is by then final. bp_array takes it as the
// output bit of that plane. Inside the plane, the carries move one position
// to the left from row to row, as carry-save accumulation requires. Rows are
// numbered globally as PLANE*KC + k, and that number selects which cells
// pet_pkg triplicates.
//
// Interface: x_taps[k] is the input word row k needs, already delayed by the
// caller. c_bits[k] = bit PLANE of coefficient k. s_in/c_in is the previous
// plane's last-row word in that plane's local weights (all zero for plane 0).
// s_q/c_q is this plane's last-row word. Latency: KC clocks.
// The KC-row plane and the 1/2 shift between planes follow the source
// architecture. The row order (row k uses coefficient k) is this design's
// choice.
module bit_plane #(
  parameter int KC    = 4,
  parameter int M     = 8,
  parameter int N     = 8,
  parameter int L0    = 16,
  parameter int ALPHA = 1,
  parameter int PLANE = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [KC-1:0][N-1:0]  x_taps,
  input  logic [KC-1:0]         c_bits,
  input  logic [L0-1:0]         s_in,
  input  logic [L0-1:0]         c_in,
  output logic [L0-1:0]         s_q,
  output logic [L0-1:0]         c_q
);
  logic [L0-1:0] rs [KC+1];   // row inputs (rs[k], rc[k] feed row k)
  logic [L0-1:0] rc [KC+1];
  logic [L0-1:0] ro_s [KC];   // row outputs
  logic [L0-1:0] ro_c [KC];

  // Entry from the previous plane: shift right by one weight.
  always_comb begin
    rs[0] = {1'b0, s_in[L0-1:1]};
    rc[0] = c_in;
  end

  for (genvar k = 0; k < KC; k++) begin : g_row
    bp_row #(
      .KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA), .ROW(PLANE * KC + k)
    ) u_row (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .x    (x_taps[k]),
      .c_bit(c_bits[k]),
      .s_in (rs[k]),
      .c_in (rc[k]),
      .s_q  (ro_s[k]),
      .c_q  (ro_c[k])
    );
    // Next row of the same plane: sum stays, carry moves one weight up.
    // The top cell's carry is dropped (always zero, see bp_row).
    always_comb begin
      rs[k+1] = ro_s[k];
      rc[k+1] = {ro_c[k][L0-2:0], 1'b0};
    end
  end

  always_comb begin
    s_q = ro_s[KC-1];
    c_q = ro_c[KC-1];
  end
endmodule
