// oba_ref_pkg: bit-level reference model of the OBA multiplier for the
// testbenches, written independently of the RTL.
//
// ref_grid() evaluates the n x n array cell by cell from the two truth tables
// (TDBA: row bypass, column bypass with carry 0, or 1 + s_in + c_in; MRBA: row
// bypass or (x & y) + s_in + c_in), with TDBAs in rows 1 and 2 and in columns
// 0 and n-2. It also counts how often each bypassing mechanism fired, so a
// testbench can show that its stimulus reached every one of them.
package oba_ref_pkg;

  localparam int MAXN = 16;

  typedef struct {
    bit s [MAXN][MAXN];   // s[i][j] = S(i, j)
    bit c [MAXN][MAXN];   // c[i][j] = C(i, j)
  } grid_t;

  typedef struct {
    longint row_bypass;       // cells skipped because x[i] = 0
    longint tdba_col_bypass;  // TDBA cells skipped because y[j] = 0
    longint tdba_eval;        // TDBA cells adding 1 + s_in + c_in
    longint mrba_eval;        // MRBA cells evaluating
    longint carry_kept;       // MRBA cells with x = 1, y = 0, c_in = 1: the
                              // carry a TDBA in their place would have lost
    longint edge_recovered;   // first-column carries added back by the edge chain
  } events_t;

  function automatic bit is_tdba(int i, int j, int n);
    return (i == 1) || (i == 2) || (j == 0) || (j == n - 2);
  endfunction

  function automatic void ref_grid(input int n, input longint unsigned xv,
                                   input longint unsigned yv, output grid_t g,
                                   inout events_t ev);
    bit xi, yj, si, ci, cb;
    int sum;
    for (int a = 0; a < MAXN; a++)
      for (int b = 0; b < MAXN; b++) begin
        g.s[a][b] = 0;
        g.c[a][b] = 0;
      end
    for (int j = 0; j < n; j++) g.s[0][j] = xv[0] & yv[j];
    for (int i = 1; i < n; i++) begin
      xi = xv[i];
      g.s[i][n-1] = xi & yv[n-1];
      for (int j = 0; j < n - 1; j++) begin
        yj = yv[j];
        si = g.s[i-1][j+1];
        ci = g.c[i-1][j];
        cb = g.c[i-1][j+1];
        if (!xi) begin
          g.c[i][j] = cb;
          g.s[i][j] = si;
          ev.row_bypass++;
        end else if (is_tdba(i, j, n) && !yj) begin
          g.c[i][j] = 0;
          g.s[i][j] = si;
          ev.tdba_col_bypass++;
        end else begin
          sum = int'(yj) + int'(si) + int'(ci);
          g.c[i][j] = sum >= 2;
          g.s[i][j] = sum[0];
          if (is_tdba(i, j, n)) ev.tdba_eval++;
          else begin
            ev.mrba_eval++;
            if (!yj && ci) ev.carry_kept++;
          end
        end
      end
    end
  endfunction

  // Product assembled from a grid: the partial sums of the first column, the
  // carries the first column did not absorb, and the last row.
  function automatic longint unsigned ref_product(input int n, input longint unsigned xv,
                                                  input longint unsigned yv,
                                                  input grid_t g, inout events_t ev);
    longint unsigned acc;
    acc = longint'(g.s[0][0]);
    for (int i = 1; i < n; i++) begin
      acc += longint'(g.s[i][0]) << i;
      if (i >= 2 && g.c[i-1][0] && !(xv[i] && yv[0])) begin
        acc += 64'd1 << i;
        ev.edge_recovered++;
      end
    end
    for (int j = 1; j < n; j++) acc += longint'(g.s[n-1][j]) << (n - 1 + j);
    for (int j = 0; j < n - 1; j++) acc += longint'(g.c[n-1][j]) << (n + j);
    return acc;
  endfunction

endpackage
