// bp_array: the bit-plane array, M bit-planes of KC rows each.
//
// Plane b handles coefficient bit b, least significant plane first. Each plane
// passes its last-row carry-save word to the next, which shifts it right by
// one position. So the accumulated sum is halved between planes, and the bit
// that falls off, plane b's local bit 0, is final output bit y^b. These low
// bits leave the array at different times, so each passes through
// (M-1-b)*KC re-timing registers and lines up with the last plane's word.
//
// Row r = b*KC + k computes the accumulation of output y_i r clocks after the
// sample x_i entered. It needs x_(i-k), so it reads x_taps[r + k]. x_taps[0]
// is the sample applied in the current cycle (see tap_delay_line).
//
// Interface: coef[j] is coefficient c_j. y_lo, s_q and c_q together hold the
// output word of one sample after the M*KC-1 enabled clocks that follow the
// clock which took the sample in (one register per row). y_lo gives
// the weights 0..M-1. s_q[l] has weight M-1+l. c_q[l] has weight M+l.
// Cells of P_ET(ALPHA) are triplicated (pet_pkg). The re-timing registers are
// this design's addition and are not triplicated.
module bp_array #(
  parameter int KC    = 4,
  parameter int M     = 8,
  parameter int N     = 8,
  parameter int L0    = 16,
  parameter int ALPHA = 1,
  localparam int NTAPS = M * KC + KC - 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [NTAPS-1:0][N-1:0] x_taps,
  input  logic [KC-1:0][M-1:0]    coef,
  output logic [M-1:0]            y_lo,
  output logic [L0-1:0]           s_q,
  output logic [L0-1:0]           c_q
);
  logic [L0-1:0] ps [M+1];   // word entering plane b (ps[b], pc[b])
  logic [L0-1:0] pc [M+1];

  always_comb begin
    ps[0] = '0;
    pc[0] = '0;
  end

  for (genvar b = 0; b < M; b++) begin : g_plane
    logic [KC-1:0][N-1:0] taps;
    logic [KC-1:0]        cb;

    always_comb begin
      for (int k = 0; k < KC; k++) begin
        taps[k] = x_taps[b * KC + 2 * k];
        cb[k]   = coef[k][b];
      end
    end

    bit_plane #(
      .KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA), .PLANE(b)
    ) u_plane (
      .clk   (clk),
      .rst   (rst),
      .en    (en),
      .x_taps(taps),
      .c_bits(cb),
      .s_in  (ps[b]),
      .c_in  (pc[b]),
      .s_q   (ps[b+1]),
      .c_q   (pc[b+1])
    );

    // Re-timing of output bit y^b.
    localparam int D = (M - 1 - b) * KC;
    if (D == 0) begin : g_direct
      always_comb y_lo[b] = ps[b+1][0];
    end else begin : g_delay
      logic [D-1:0] sr;
      always_ff @(posedge clk) begin
        if (rst)     sr <= '0;
        else if (en) begin
          sr[0] <= ps[b+1][0];
          for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
        end
      end
      always_comb y_lo[b] = sr[D-1];
    end
  end

  always_comb begin
    s_q = ps[M];
    c_q = pc[M];
  end
endmodule
