// tb_workloads: runs the three reference array sizes (KC=4 and M=8 for all;
// N=8/L0=16, N=16/L0=24, N=24/L0=32) at several degrees of partial error
// tolerance, from the plain array (ALPHA=0) to the fully triplicated one
// (ALPHA=L0). Each instance streams random samples and checks every result
// against a behavioural FIR model. For each configuration, the number of
// triplicated cells P_ET(ALPHA) selects, and the resulting cell total, are
// also compared with the published counts. A fifth instance runs the small
// worked example of the method (KC=2, M=2, N=2, L0=4, ALPHA=1).
module tb_workloads;
  logic clk = 1'b0;
  logic rst;
  localparam int NI = 5;
  int ck [NI];
  int fl [NI];
  logic dn [NI];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  fir_stream_check #(.N(8),  .L0(16), .ALPHA(0))  u0 (.clk, .rst, .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  fir_stream_check #(.N(8),  .L0(16), .ALPHA(16)) u1 (.clk, .rst, .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  fir_stream_check #(.N(16), .L0(24), .ALPHA(1))  u2 (.clk, .rst, .checks(ck[2]), .failures(fl[2]), .done(dn[2]));
  fir_stream_check #(.N(24), .L0(32), .ALPHA(4))  u3 (.clk, .rst, .checks(ck[3]), .failures(fl[3]), .done(dn[3]));
  // The small worked example: 2 taps, 2-bit coefficients, 2-bit samples.
  fir_stream_check #(.KC(2), .M(2), .N(2), .L0(4), .ALPHA(1))
                                                  u4 (.clk, .rst, .checks(ck[4]), .failures(fl[4]), .done(dn[4]));

  // {L0, ALPHA, published basic-cell total} of the first four instances.
  int expect_cells [NI-1][3] = '{
    '{16, 0, 512}, '{16, 16, 1536}, '{24, 1, 1598}, '{32, 4, 2048}
  };

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (dn[i]) if (!dn[i]) all_done = 1'b0;
    end while (!all_done);
    foreach (ck[i]) begin
      checks   += ck[i];
      failures += fl[i];
    end
    foreach (expect_cells[i]) begin
      checks++;
      if (pet_pkg::tmr_cell_total(expect_cells[i][1], 4, 8, expect_cells[i][0]) != expect_cells[i][2]) begin
        failures++;
        $display("FAIL cell total L0=%0d alpha=%0d", expect_cells[i][0], expect_cells[i][1]);
      end
      $display("L0=%0d ALPHA=%0d: %0d cells triplicated, %0d basic cells", expect_cells[i][0],
               expect_cells[i][1], pet_pkg::ft_cell_count(expect_cells[i][1], 4, 8, expect_cells[i][0]),
               pet_pkg::tmr_cell_total(expect_cells[i][1], 4, 8, expect_cells[i][0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
