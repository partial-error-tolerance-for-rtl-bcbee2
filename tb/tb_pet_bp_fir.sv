// tb_pet_bp_fir: end-to-end test of the filter at its default sizes (KC=4,
// M=8, N=8, L0=16, ALPHA=1). Random samples are streamed through, random
// stalls included. Every output is compared with y_i = sum_j c_j x_(i-j),
// computed in the testbench. Each phase also checks y_valid and the latency:
// a result must appear exactly KC*M enabled clocks after its sample.
//
// Phases:
//   0  fault free, with bursts of all-ones samples (largest result)
//   1  stuck-at faults in one copy of two triplicated cells, one in the
//      first row (weight 0) and one in the last row (weight 22). Every result
//      must still be exact.
//   2  stuck-at-1 on the sum and carry of a plain cell of the last row
//      (weight 21, carry weight 22), outside P_ET(1). Results may be wrong,
//      but only by 0, 2^21, 2^22 or 2^21+2^22: always less than 2^(W-ALPHA).
//   3  synchronous reset in mid-stream, then a fresh fault-free stream. The
//      pipeline must empty and refill.
// Each mechanism (stall, TMR masking, tolerated error, full-range result,
// mid-stream reset) is counted, and one that never occurred counts as a
// failure.
module tb_pet_bp_fir;
  localparam int KC = 4, M = 8, N = 8, L0 = 16, ALPHA = 1;
  localparam int R = KC * M, W = L0 + M;

  logic clk = 1'b0;
  logic rst, in_valid;
  logic [N-1:0] x_in;
  logic [KC-1:0][M-1:0] coef;
  logic y_valid;
  logic [W-1:0] y;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_masked = 0, n_tolerated = 0, n_fullrange = 0, n_reset = 0, n_latency = 0;

  pet_bp_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] xs [$];      // samples since the last reset
  int           tin [$];     // enabled-clock number at which each was taken
  int           nen;         // enabled clocks since the last reset
  int           nout;        // results seen since the last reset

  function automatic longint fir_ref(int i);
    longint s = 0;
    for (int j = 0; j < KC; j++)
      if (i - j >= 0) s += longint'(coef[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  task automatic do_reset();
    rst = 1'b1; in_valid = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    xs.delete(); tin.delete(); nen = 0; nout = 0;
    checks++;
    if (y_valid !== 1'b0 || y !== '0) begin failures++; $display("FAIL reset state"); end
  endtask

  // Runs nsamp clocks; phase selects the check applied to results.
  task automatic run(int phase, int nclk);
    longint exp_v, err;
    logic   exp_valid;
    for (int t = 0; t < nclk; t++) begin
      in_valid = ($urandom % 6) != 0;
      if (!in_valid && nen > 0) n_stall++;
      x_in = (phase == 0 && (t % 64) < 12) ? '1 : N'($urandom);
      @(posedge clk); #1;
      exp_valid = 1'b0;
      if (in_valid) begin
        xs.push_back(x_in);
        nen++;
        tin.push_back(nen);
        exp_valid = (nen > R);
      end
      checks++;
      if (y_valid !== exp_valid) begin
        failures++;
        $display("FAIL phase %0d y_valid=%b expected %b (nen=%0d)", phase, y_valid, exp_valid, nen);
      end
      if (y_valid && exp_valid) begin
        // Latency: the result of sample nout leaves at enabled clock tin+R.
        checks++;
        if (nen - tin[nout] != R) begin
          failures++;
          $display("FAIL latency %0d", nen - tin[nout]);
        end else n_latency++;
        exp_v = fir_ref(nout);
        err   = longint'(y) - exp_v;
        if (exp_v == longint'(KC) * 255 * 255 && coef == '1) n_fullrange++;
        checks++;
        if (phase == 2) begin
          if (!(err == 0 || err == (1 << 21) || err == (1 << 22) || err == (3 << 21)) ||
              err >= (longint'(1) << (W - ALPHA))) begin
            failures++;
            $display("FAIL phase 2 sample %0d error %0d out of bound", nout, err);
          end else if (err != 0) n_tolerated++;
        end else if (err != 0) begin
          failures++;
          $display("FAIL phase %0d sample %0d got %0d expected %0d", phase, nout, y, exp_v);
        end
        nout++;
      end
      // A stuck copy that disagrees with its partners is a masked fault.
      if (phase == 1 && in_valid &&
          (dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[15].g_ft.u_cell.g_copy[0].u_cell.s_q == 1'b0 ||
           dut.u_array.g_plane[0].u_plane.g_row[0].u_row.g_col[0].g_ft.u_cell.g_copy[0].u_cell.s_q == 1'b0))
        n_masked++;
    end
  endtask

  initial begin
    x_in = '0;
    coef = '1;   // all-ones coefficients: largest products
    do_reset();
    run(0, 400);

    // Phase 1: single-copy faults inside P_ET(1).
    for (int j = 0; j < KC; j++) coef[j] = M'($urandom);
    coef[0] = 8'hff;
    do_reset();
    force dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[15].g_ft.u_cell.g_copy[1].u_cell.s_q = 1'b1;
    force dut.u_array.g_plane[0].u_plane.g_row[0].u_row.g_col[0].g_ft.u_cell.g_copy[2].u_cell.s_q = 1'b1;
    run(1, 400);
    release dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[15].g_ft.u_cell.g_copy[1].u_cell.s_q;
    release dut.u_array.g_plane[0].u_plane.g_row[0].u_row.g_col[0].g_ft.u_cell.g_copy[2].u_cell.s_q;

    // Phase 2: fault in a plain cell outside P_ET(1).
    do_reset();
    force dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[14].g_plain.u_cell.s_q = 1'b1;
    force dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[14].g_plain.u_cell.c_q = 1'b1;
    run(2, 400);
    release dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[14].g_plain.u_cell.s_q;
    release dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[14].g_plain.u_cell.c_q;

    // Phase 3: reset in mid-stream (the pipeline is full here), then restart.
    do_reset();
    run(3, 100);
    checks++;
    if (!y_valid && nout == 0) begin failures++; $display("FAIL no output before reset"); end
    do_reset();
    n_reset++;
    run(3, 300);

    $display("mechanisms: stall=%0d tmr_masked=%0d tolerated_error=%0d full_range=%0d reset=%0d latency_ok=%0d",
             n_stall, n_masked, n_tolerated, n_fullrange, n_reset, n_latency);
    checks += 6;
    if (n_stall == 0)     begin failures++; $display("FAIL no stall"); end
    if (n_masked == 0)    begin failures++; $display("FAIL no masked fault"); end
    if (n_tolerated == 0) begin failures++; $display("FAIL no tolerated error"); end
    if (n_fullrange == 0) begin failures++; $display("FAIL no full-range result"); end
    if (n_reset == 0)     begin failures++; $display("FAIL no mid-stream reset"); end
    if (n_latency == 0)   begin failures++; $display("FAIL no latency check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
