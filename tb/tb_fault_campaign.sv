// tb_fault_campaign: fault injection over every basic cell of the default
// filter (KC=4, M=8, N=8, L0=16, ALPHA=1, 512 cells).
//
// Each cell is visited in turn. Between visits the filter is reset, one fault
// is forced, and a short random stream (with full-scale bursts) runs through.
// Every result is compared with a behavioural FIR sum.
//   - Triplicated cells (inside P_ET(ALPHA)): the sum of one copy is stuck
//     at 1, then the carry of another copy is stuck at 0. Every result must
//     be exact.
//   - Plain cells: the sum and the carry are each stuck at 0 and at 1. A
//     result may be wrong, but by less than 2^(W-ALPHA).
// The largest error seen from a plain cell is reported. The campaign fails if
// no plain-cell fault ever changed a result or no copy fault was ever masked.
module tb_fault_campaign;
  localparam int KC = 4, M = 8, N = 8, L0 = 16, ALPHA = 1;
  localparam int R = KC * M, W = L0 + M;
  localparam int NSAMP = 12;

  logic clk = 1'b0;
  logic rst, in_valid;
  logic [N-1:0] x_in;
  logic [KC-1:0][M-1:0] coef;
  logic y_valid;
  logic [W-1:0] y;

  int checks = 0;
  int failures = 0;
  int n_runs = 0, n_visible = 0, n_masked_runs = 0;
  longint max_err = 0;

  pet_bp_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fault selection: cell (sel_r, sel_l), fault kind sel_mode.
  int   sel_r = -1, sel_l = -1, sel_mode = 0;
  event ev_apply, ev_clear;

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar l = 0; l < L0; l++) begin : g_l
      if (pet_pkg::in_pet(r, l, ALPHA, KC, M, L0)) begin : g_ft
        localparam int K0 = (r + l) % 3;
        localparam int K1 = (r + l + 1) % 3;
        initial forever begin
          @(ev_apply);
          if (sel_r == r && sel_l == l) begin
            if (sel_mode == 0)
              force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_ft.u_cell.g_copy[K0].u_cell.s_q = 1'b1;
            else
              force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_ft.u_cell.g_copy[K1].u_cell.c_q = 1'b0;
            @(ev_clear);
            release dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_ft.u_cell.g_copy[K0].u_cell.s_q;
            release dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_ft.u_cell.g_copy[K1].u_cell.c_q;
          end
        end
      end else begin : g_plain
        initial forever begin
          @(ev_apply);
          if (sel_r == r && sel_l == l) begin
            case (sel_mode)
              0: force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.s_q = 1'b0;
              1: force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.s_q = 1'b1;
              2: force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.c_q = 1'b0;
              default: force dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.c_q = 1'b1;
            endcase
            @(ev_clear);
            release dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.s_q;
            release dut.u_array.g_plane[r/KC].u_plane.g_row[r%KC].u_row.g_col[l].g_plain.u_cell.c_q;
          end
        end
      end
    end
  end

  logic [N-1:0] xs [$];

  function automatic longint fir_ref(int i);
    longint s = 0;
    for (int j = 0; j < KC; j++)
      if (i - j >= 0) s += longint'(coef[j]) * longint'(xs[i-j]);
    return s;
  endfunction

  // One run: reset, apply the selected fault, stream NSAMP results.
  task automatic one_run(bit protected_cell);
    int nout;
    longint err;
    bit changed;
    rst = 1'b1; in_valid = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    xs.delete();
    nout = 0;
    changed = 1'b0;
    ->ev_apply;
    #1;
    while (nout < NSAMP) begin
      in_valid = 1'b1;
      x_in = ($urandom % 3 == 0) ? '1 : N'($urandom);
      @(posedge clk); #1;
      xs.push_back(x_in);
      if (y_valid) begin
        err = longint'(y) - fir_ref(nout);
        if (err < 0) err = -err;
        checks++;
        if (protected_cell ? (err != 0) : (err >= (longint'(1) << (W - ALPHA)))) begin
          failures++;
          $display("FAIL cell (%0d,%0d) mode %0d sample %0d: error %0d", sel_r, sel_l, sel_mode, nout, err);
        end
        if (err != 0) changed = 1'b1;
        if (!protected_cell && err > max_err) max_err = err;
        nout++;
      end
    end
    ->ev_clear;
    #1;
    n_runs++;
    if (!protected_cell && changed) n_visible++;
    if (protected_cell) n_masked_runs++;
  endtask

  initial begin
    bit ft;
    x_in = '0;
    for (int j = 0; j < KC; j++) coef[j] = M'($urandom);
    coef[0] = '1;
    #1;
    for (int r = 0; r < R; r++) begin
      for (int l = 0; l < L0; l++) begin
        ft = pet_pkg::in_pet(r, l, ALPHA, KC, M, L0);
        sel_r = r;
        sel_l = l;
        for (int mode = 0; mode < (ft ? 2 : 4); mode++) begin
          sel_mode = mode;
          one_run(ft);
        end
      end
    end
    $display("fault runs=%0d: protected-cell runs=%0d, plain-cell runs with a visible error=%0d, largest plain-cell error=%0d (bound %0d)",
             n_runs, n_masked_runs, n_visible, max_err, (longint'(1) << (W - ALPHA)) - 1);
    checks += 2;
    if (n_visible == 0)     begin failures++; $display("FAIL no plain-cell fault was visible"); end
    if (n_masked_runs == 0) begin failures++; $display("FAIL no protected-cell fault was run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
