// tb_tmr_voter: random 8-bit vectors. Each case corrupts at most one copy per
// bit, and the voted output must equal the true value. The mismatch flag must
// reflect any disagreement. A bitwise majority computed bit by bit in the
// testbench is also compared for fully random copies.
module tb_tmr_voter;
  localparam int WIDTH = 8;
  logic [WIDTH-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0;
  int failures = 0;

  tmr_voter #(.WIDTH(WIDTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] t, e;
    logic [WIDTH-1:0] maj;
    int which;
    for (int i = 0; i < 300; i++) begin
      t = WIDTH'($urandom);
      e = (i % 4 == 0) ? '0 : WIDTH'($urandom);
      which = i % 3;
      a = t ^ (which == 0 ? e : '0);
      b = t ^ (which == 1 ? e : '0);
      c = t ^ (which == 2 ? e : '0);
      #1;
      checks++;
      if (y !== t) begin failures++; $display("FAIL vote t=%h y=%h", t, y); end
      checks++;
      if (mismatch !== (e != 0)) begin failures++; $display("FAIL mismatch e=%h", e); end
    end
    for (int i = 0; i < 200; i++) begin
      a = WIDTH'($urandom); b = WIDTH'($urandom); c = WIDTH'($urandom);
      #1;
      for (int k = 0; k < WIDTH; k++)
        maj[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== maj) begin failures++; $display("FAIL random a=%h b=%h c=%h y=%h", a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
