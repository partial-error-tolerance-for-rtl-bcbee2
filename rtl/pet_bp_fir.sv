// pet_bp_fir: partially error-tolerant bit-plane FIR filter (top level).
//
// Computes y_i = c_0 x_i + c_1 x_(i-1) + ... + c_(KC-1) x_(i-KC+1) for
// unsigned N-bit samples and unsigned M-bit coefficients. It takes one sample
// per clock, and each output word is ready KC*M clocks after its sample.
//
// The product is computed bit-plane by bit-plane. Bit-plane b is a group of
// KC rows of basic cells. Row k adds x_(i-k) AND c_k^b to a carry-save word
// that moves down one row per clock. Between planes the word shifts right by
// one place, and the bit that falls off is output bit b. After the last plane
// a carry-propagate adder forms the upper L0 bits. The full output is L0+M
// bits wide.
//
// Partial error tolerance: only the cells that can affect the ALPHA most
// significant output bits are triplicated (TMR with a majority voter). This
// set is P_ET(ALPHA), the union of the error significance maps of those
// bits, computed at elaboration by pet_pkg. A fault in any other single cell
// changes the result by less than 2^(L0+M-ALPHA). ALPHA = 0 gives the plain
// array and ALPHA = L0 a fully triplicated one.
//
// Interface and timing:
//   in_valid  high: x_in is a new sample and the whole pipeline advances.
//             low: the whole pipeline, delay line included, holds (stall).
//   coef      coefficient c_j in coef[j]. It must be held stable while
//             samples are in flight.
//   y_valid   high for one clock after each enabled clock once the pipeline
//             is full. y then holds the output for the sample applied KC*M
//             enabled clocks earlier. Samples before the first one count as 0.
// Reset: rst is synchronous and active high. It clears every register.
//
// The bit-plane structure, the row-per-clock pipelining, the KC*M latency,
// the P_ET(alpha) rule and the default sizes (Arr1 of the source: KC=4, M=8,
// N=8, L0=16) follow the source architecture. The shared sample delay line,
// the output adder, the stall and the valid handshake are this design's
// choices.
module pet_bp_fir #(
  parameter int KC    = 4,
  parameter int M     = 8,
  parameter int N     = 8,
  parameter int L0    = 16,
  parameter int ALPHA = 1,
  localparam int R    = M * KC,
  localparam int W    = L0 + M
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [N-1:0]         x_in,
  input  logic [KC-1:0][M-1:0] coef,
  output logic                 y_valid,
  output logic [W-1:0]         y
);
  localparam int NTAPS = R + KC - 1;

  // Size rules: a row must hold the input word plus 1 + log2(KC) bits of
  // growth of the accumulated sum, so that no carry leaves the band.
  if (L0 < N) begin : g_chk_l0
    $error("pet_bp_fir: L0 must be at least N");
  end
  if (M < 2) begin : g_chk_m
    $error("pet_bp_fir: M must be at least 2");
  end
  if (L0 <= N || (1 << (L0 - N - 1)) < KC) begin : g_chk_kc
    $error("pet_bp_fir: need L0 >= N + 1 + log2(KC)");
  end
  if (ALPHA < 0 || ALPHA > L0) begin : g_chk_alpha
    $error("pet_bp_fir: ALPHA out of 0..L0");
  end

  logic [NTAPS-1:0][N-1:0] taps;
  logic [M-1:0]            y_lo;
  logic [L0-1:0]           s_last;
  logic [L0-1:0]           c_last;
  logic [$clog2(R+1)-1:0]  fill;

  tap_delay_line #(.N(N), .DEPTH(NTAPS - 1)) u_taps (
    .clk (clk),
    .rst (rst),
    .en  (in_valid),
    .x_in(x_in),
    .taps(taps)
  );

  bp_array #(
    .KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA)
  ) u_array (
    .clk   (clk),
    .rst   (rst),
    .en    (in_valid),
    .x_taps(taps),
    .coef  (coef),
    .y_lo  (y_lo),
    .s_q   (s_last),
    .c_q   (c_last)
  );

  cs_merge #(.M(M), .L0(L0)) u_merge (
    .clk (clk),
    .rst (rst),
    .en  (in_valid),
    .s_in(s_last),
    .c_in(c_last),
    .y_lo(y_lo),
    .y   (y)
  );

  // Pipeline fill count: the first output leaves after R enabled clocks.
  always_ff @(posedge clk) begin
    if (rst) begin
      fill    <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid && (fill == R[$bits(fill)-1:0]);
      if (in_valid && fill != R[$bits(fill)-1:0]) fill <= fill + 1'b1;
    end
  end
endmodule
