// tb_pet_pkg: checks the error significance map functions of pet_pkg.
//
// 1. The triplicated-cell totals of P_ET(alpha) are compared with the basic-
//    cell counts published for the three reference arrays (KC=4, M=8 and
//    L0 = 16, 24, 32), for every alpha listed, including the plain (alpha=0)
//    and fully triplicated (alpha=L0) ends.
// 2. For the small example array (KC=2, M=2, L0=4) and for the first
//    reference array, the membership of every cell is compared with a
//    reachability search over the explicit row/weight graph. The search walks
//    back from the alpha top output nodes.
module tb_pet_pkg;
  import pet_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Published basic-cell totals: {L0, alpha, cells}.
  int table2 [][3] = '{
    '{16, 16, 1536}, '{16, 8, 1450}, '{16, 4, 1344}, '{16, 2, 1274}, '{16, 1, 1236}, '{16, 0, 512},
    '{24, 24, 2304}, '{24, 16, 2218}, '{24, 8, 1962}, '{24, 4, 1770}, '{24, 2, 1658}, '{24, 1, 1598}, '{24, 0, 768},
    '{32, 32, 3072}, '{32, 24, 2986}, '{32, 16, 2730}, '{32, 8, 2304}, '{32, 4, 2048}, '{32, 2, 1920}, '{32, 1, 1856}, '{32, 0, 1024}
  };

  // Reachability over the explicit graph: node (r, w), r = 0..R, w = 0..TOP.
  // Edges (r, w) -> (r+1, w) and (r+1, w+1). A cell is marked when some
  // output node (R, eta) with eta >= TOP-alpha+1 is reachable from it.
  task automatic check_graph(int kc, int m, int l0);
    int R;
    int top;
    bit reach [][];
    R   = m * kc;
    top = m + l0 - 1;
    for (int alpha = 0; alpha <= l0; alpha++) begin
      reach = new[R + 1];
      for (int r = 0; r <= R; r++) reach[r] = new[top + 2];
      for (int w = 0; w <= top; w++) reach[R][w] = (w >= top - alpha + 1);
      for (int r = R - 1; r >= 0; r--)
        for (int w = 0; w <= top; w++)
          reach[r][w] = reach[r+1][w] | reach[r+1][w+1];
      for (int r = 0; r < R; r++)
        for (int l = 0; l < l0; l++)
          check_eq($sformatf("map kc=%0d m=%0d l0=%0d alpha=%0d cell(%0d,%0d)", kc, m, l0, alpha, r, l),
                   int'(in_pet(r, l, alpha, kc, m, l0)), int'(reach[r][r / kc + l]));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (table2[i])
      check_eq($sformatf("cells L0=%0d alpha=%0d", table2[i][0], table2[i][1]),
               tmr_cell_total(table2[i][1], 4, 8, table2[i][0]), table2[i][2]);
    // 362 of the 512 cells of the first array are triplicated for alpha = 1.
    check_eq("ft cells L0=16 alpha=1", ft_cell_count(1, 4, 8, 16), 362);
    check_graph(2, 2, 4);
    check_graph(4, 8, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
