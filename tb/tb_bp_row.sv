// tb_bp_row: one row (global row 20 of the default 32-row array, ALPHA=4).
// Random words are applied each clock. The registered sum and carry vectors
// are compared with a bit-by-bit full-adder model of x AND c_bit plus the
// incoming carry-save word. The triplication map is checked structurally.
// For this row the map puts cells 3..15 inside P_ET(4) and cells 0..2 outside.
// A fault forced into one copy of cell 3 must be masked. A fault forced into
// plain cell 2 must show at its output.
module tb_bp_row;
  localparam int KC = 4, M = 8, N = 8, L0 = 16, ALPHA = 4, ROW = 20;
  logic clk = 1'b0;
  logic rst, en, c_bit;
  logic [N-1:0] x;
  logic [L0-1:0] s_in, c_in, s_q, c_q;
  int checks = 0;
  int failures = 0;

  bp_row #(.KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA), .ROW(ROW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L0-1:0] es, ec;
  logic pp;

  task automatic apply_random();
    x = N'($urandom); c_bit = 1'($urandom); s_in = L0'($urandom); c_in = L0'($urandom);
    for (int l = 0; l < L0; l++) begin
      pp = (l < N) ? (x[l] & c_bit) : 1'b0;
      es[l] = pp ^ s_in[l] ^ c_in[l];
      ec[l] = (pp & s_in[l]) | (pp & c_in[l]) | (s_in[l] & c_in[l]);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; x = '0; c_bit = 0; s_in = '0; c_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      apply_random();
      @(posedge clk); #1;
      checks++;
      if (s_q !== es || c_q !== ec) begin
        failures++;
        $display("FAIL i=%0d s=%h/%h c=%h/%h", i, s_q, es, c_q, ec);
      end
    end
    // Fault in one copy of triplicated cell 3: masked.
    for (int i = 0; i < 20; i++) begin
      apply_random();
      @(posedge clk); #1;
      force dut.g_col[3].g_ft.u_cell.g_copy[1].u_cell.s_q = ~es[3];
      #1;
      checks++;
      if (s_q[3] !== es[3]) begin failures++; $display("FAIL TMR cell 3 not masking"); end
      release dut.g_col[3].g_ft.u_cell.g_copy[1].u_cell.s_q;
    end
    // Fault in plain cell 2: visible.
    for (int i = 0; i < 20; i++) begin
      apply_random();
      @(posedge clk); #1;
      force dut.g_col[2].g_plain.u_cell.s_q = ~es[2];
      #1;
      checks++;
      if (s_q[2] !== ~es[2]) begin failures++; $display("FAIL plain cell 2 fault not visible"); end
      release dut.g_col[2].g_plain.u_cell.s_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
