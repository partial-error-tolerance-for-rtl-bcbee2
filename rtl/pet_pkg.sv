// pet_pkg: shared constants and the error significance map of the bit-plane
// (BP) FIR array.
//
// The array is a grid of M*KC rows of basic cells (M bit-planes of KC rows
// each). Every row holds L0 cells. In absolute bit weights, row r belongs to
// bit-plane b = r / KC, and its cells sit at weights b .. b+L0-1. The one-place
// right shift between bit-planes only moves this band up one weight. Inside
// the regular graph, a cell at weight w feeds the next row at weights w (sum)
// and w+1 (carry). This is the column connectivity G_C, which is 1 on the main
// diagonal and on the diagonal below it. The last graph row holds the L0
// output nodes y^eta, at weights M .. M+L0-1.
//
// Transitive closure: the block of the closure between rows r and R = M*KC is
// G_C^(R-r). By the closed form of G_C^d (1 where j <= i <= j+d), a cell at
// (r, w) reaches the output at weight eta iff w <= eta <= w + (R - r). The
// error significance set M_eta is every cell that reaches y^eta. The degree of
// partial error tolerance P_ET(alpha) is the union of M_eta over the alpha
// most significant outputs. A cell is triplicated iff it belongs to
// P_ET(alpha). Because a cell only reaches weights at or above its own, and
// the top output has the highest weight, the union reduces to one test:
// w + (R - r) >= (M+L0-1) - alpha + 1.
//
// The functions are evaluated at elaboration time. Each row then instantiates
// every cell either plain or triplicated, as the cell's generic decides.
package pet_pkg;

  // Absolute bit weight of local cell l in global row r.
  function automatic int cell_weight(int r, int l, int kc);
    return (r / kc) + l;
  endfunction

  // Weight of the most significant output bit.
  function automatic int top_weight(int m, int l0);
    return m + l0 - 1;
  endfunction

  // Error significance, Definition 2: cell (r, l) lies in M_eta.
  function automatic bit in_m_eta(int r, int l, int eta, int kc, int m);
    int w;
    int d;
    w = cell_weight(r, l, kc);
    d = m * kc - r;                      // rows between the cell and the outputs
    return (eta >= w) && (eta <= w + d);
  endfunction

  // Partial error tolerance, Definition 4: cell (r, l) lies in P_ET(alpha),
  // the union of M_eta over the alpha most significant output bits.
  function automatic bit in_pet(int r, int l, int alpha, int kc, int m, int l0);
    bit hit;
    hit = 1'b0;
    for (int eta = top_weight(m, l0) - alpha + 1; eta <= top_weight(m, l0); eta++)
      if (in_m_eta(r, l, eta, kc, m)) hit = 1'b1;
    return hit;
  endfunction

  // Number of basic cells that P_ET(alpha) triplicates.
  function automatic int ft_cell_count(int alpha, int kc, int m, int l0);
    int n;
    n = 0;
    for (int r = 0; r < m * kc; r++)
      for (int l = 0; l < l0; l++)
        if (in_pet(r, l, alpha, kc, m, l0)) n++;
    return n;
  endfunction

  // Basic-cell count of the array with TMR applied to P_ET(alpha): every
  // triplicated cell costs three cells, every other cell one.
  function automatic int tmr_cell_total(int alpha, int kc, int m, int l0);
    return m * kc * l0 + 2 * ft_cell_count(alpha, kc, m, l0);
  endfunction

endpackage
