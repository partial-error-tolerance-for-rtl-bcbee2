// tb_tmr_cell: the triplicated cell must behave as a basic cell, and must
// mask a fault in any single copy. Random inputs are applied each clock and
// the outputs are compared with x*c + s_in + c_in from the previous clock.
// In three phases, the sum and carry registers of copy 0, 1 or 2 are forced
// to the wrong value: the outputs must stay correct. In a last phase two
// copies are forced, and the testbench checks that the error then shows.
module tb_tmr_cell;
  logic clk = 1'b0;
  logic rst, en, x_bit, c_bit, s_in, c_in, s_q, c_q;
  int checks = 0;
  int failures = 0;
  int masked = 0;

  tmr_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] exp_q;

  initial begin
    rst = 1'b1; en = 1'b1; {x_bit, c_bit, s_in, c_in} = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int phase = 0; phase < 5; phase++) begin
      for (int i = 0; i < 40; i++) begin
        {x_bit, c_bit, s_in, c_in} = 4'($urandom);
        exp_q = 2'((x_bit & c_bit) + s_in + c_in);
        @(posedge clk); #1;
        // Faults are applied after the edge, on the freshly registered copies.
        case (phase)
          1: begin force dut.g_copy[0].u_cell.s_q = ~exp_q[0]; force dut.g_copy[0].u_cell.c_q = ~exp_q[1]; end
          2: begin force dut.g_copy[1].u_cell.s_q = ~exp_q[0]; force dut.g_copy[1].u_cell.c_q = ~exp_q[1]; end
          3: begin force dut.g_copy[2].u_cell.s_q = ~exp_q[0]; force dut.g_copy[2].u_cell.c_q = ~exp_q[1]; end
          4: begin force dut.g_copy[0].u_cell.s_q = ~exp_q[0]; force dut.g_copy[2].u_cell.s_q = ~exp_q[0]; end
          default: ;
        endcase
        #1;
        checks++;
        if (phase < 4) begin
          if ({c_q, s_q} !== exp_q) begin
            failures++;
            $display("FAIL phase %0d got %b%b expected %b", phase, c_q, s_q, exp_q);
          end else if (phase > 0) masked++;
        end else if (s_q !== ~exp_q[0]) begin
          failures++;
          $display("FAIL two-copy fault not visible");
        end
        release dut.g_copy[0].u_cell.s_q; release dut.g_copy[0].u_cell.c_q;
        release dut.g_copy[1].u_cell.s_q; release dut.g_copy[1].u_cell.c_q;
        release dut.g_copy[2].u_cell.s_q; release dut.g_copy[2].u_cell.c_q;
      end
    end
    checks++;
    if (masked != 120) begin failures++; $display("FAIL masked=%0d", masked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
