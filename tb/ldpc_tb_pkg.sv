// ldpc_tb_pkg: test support for the decoder testbenches.
//
// qc_code builds a quasi-cyclic LDPC code with the parity structure used by
// the WiMAX codes (a weight-3 first parity column and a dual-diagonal
// staircase), random info-part shifts (info column c sits in block rows c, c+1 and c+2), and the off-line schedule the decoder
// needs: row r runs on PE r mod P as its (r div P)-th PCC; the edges of a row
// use consecutive locations of that PCC's block, in column order; the message
// produced on an edge goes to the next row (cyclically) holding the same
// column. For the early stopping block it also produces the shuffle tables,
// which are conflict free when P divides z: in shuffle cycle t, SMin_i holds
// the syndrome of row t*P + i, whose SAV element h = r mod z is kept in
// SMout (h mod P) at slot (h div P)*c + (r div z).
package ldpc_tb_pkg;

  class qc_code;
    int z, mb, nb, kb, nd, p, nx, n, m;
    int base [][];          // shift, -1 = zero block
    int row_deg [];         // per row
    int row_col [][];       // [row][pos] column
    int col_edges [][];     // [col] list of row*64+pos, rows ascending
    int edges;

    function new(int z_, int mb_, int nb_, int nd_, int nx_, int ny_, int seed);
      int dummy;
      z = z_; mb = mb_; nb = nb_; kb = nb - mb; nd = nd_; nx = nx_; p = nx_ * ny_;
      n = nb * z; m = mb * z;
      dummy = $urandom(seed);
      base = new[mb];
      foreach (base[i]) begin
        base[i] = new[nb];
        foreach (base[i][j]) base[i][j] = -1;
      end
      // info part: info column c in block rows c, c+1, c+2 (mod mb)
      for (int c = 0; c < kb; c++)
        for (int k = 0; k < 3; k++) base[(c + k) % mb][c] = $urandom_range(0, z - 1);
      // parity part
      base[0][kb] = 1; base[mb / 2][kb] = 0; base[mb - 1][kb] = 1;
      for (int i = 0; i < mb - 1; i++) begin
        base[i][kb + 1 + i] = 0;
        base[i + 1][kb + 1 + i] = 0;
      end
      // expand
      row_deg = new[m];
      row_col = new[m];
      col_edges = new[n];
      edges = 0;
      for (int r = 0; r < m; r++) begin
        int br, k, d;
        br = r / z; k = r % z; d = 0;
        row_col[r] = new[nd];
        for (int bc = 0; bc < nb; bc++)
          if (base[br][bc] >= 0) begin
            int col;
            col = bc * z + (k + base[br][bc]) % z;
            row_col[r][d] = col;
            col_edges[col] = new[col_edges[col].size() + 1](col_edges[col]);
            col_edges[col][col_edges[col].size() - 1] = r * 64 + d;
            d++;
          end
        row_deg[r] = d;
        edges += d;
      end
    endfunction

    function int pe_of(int r);   return r % p; endfunction
    function int loc_of(int r);  return r / p; endfunction
    function int addr_of(int r, int pos); return (r / p) * nd + pos; endfunction
    function int rows_per_pe();  return (m + p - 1) / p; endfunction

    // {DNI, RO} of the message produced by edge (r, pos)
    function int dest_of(int r, int pos, int aw);
      int col, idx, nxt, nr, npos, pe;
      col = row_col[r][pos];
      idx = 0;
      foreach (col_edges[col][i]) if (col_edges[col][i] == r * 64 + pos) idx = i;
      nxt = col_edges[col][(idx + 1) % col_edges[col].size()];
      nr = nxt / 64; npos = nxt % 64; pe = pe_of(nr);
      return (((pe / nx) << 3 | (pe % nx)) << aw) | addr_of(nr, npos);
    endfunction

    // is edge (r, pos) the first of its column (it starts from the channel LLR)
    function int is_first(int r, int pos);
      return (col_edges[row_col[r][pos]][0] == r * 64 + pos) ? 1 : 0;
    endfunction

    // location holding column col (its first edge): PE and address
    function void where(int col, output int pe, output int addr);
      int e;
      e = col_edges[col][0];
      pe = pe_of(e / 64); addr = addr_of(e / 64, e % 64);
    endfunction

    // SWA word of SMout j in shuffle cycle t
    function int swa_of(int j, int t, int sow);
      int r, h;
      r = t * p + j;
      if (r >= m) return 0;
      h = r % z;
      return (1 << sow) | ((h / p) * mb + r / z);
    endfunction
  endclass

  // Channel LLRs for the all-zero codeword: positive values of random size,
  // with `nerr` positions turned negative (hard-decision errors).
  function automatic void make_llrs(int n, int nerr, output int llr []);
    llr = new[n];
    foreach (llr[j]) llr[j] = $urandom_range(6, 30);
    for (int e = 0; e < nerr; e++) llr[$urandom_range(0, n - 1)] = -$urandom_range(2, 10);
  endfunction

endpackage
