// oba_array: the carry-save adder-cell array of an N x N OBA multiplier.
//
// Row 0 is the partial product x[0] & y[j]. Each further row i (1..N-1) holds
// N-1 cells, columns j = 0..N-2. Cell (i, j) takes
//   s_in = S(i-1, j+1), c_in = C(i-1, j)   (the operands it adds),
//   c    = C(i-1, j+1)                     (the carry it passes when row i is
//                                           bypassed, x[i] = 0),
// and produces S(i, j) of weight i+j and C(i, j) of weight i+j+1. The leftmost
// sum input of row i is the partial product x[i-1] & y[N-1]; carries entering
// from outside the array (row 0 and column N-1) are 0. This is the array
// wiring of the document's overall structure and its carry-problem example.
//
// Cell placement (oba_pkg::cell_kind): TDBA in rows 1 and 2 and in the first
// (j = 0) and last (j = N-2) columns, MRBA elsewhere, as in the document. A
// first-column TDBA that is bypassed (by row or by column) does not absorb
// its c_in; that carry leaves the array on first_c and is added back by
// oba_edge_chain. A deferred assertion checks, for every other TDBA, that
// no carry is ever dropped, which is the document's argument for placing the
// TDBAs where it does.
//
// Outputs:
//   p0       product bit 0
//   first_s  S(i, 0) for rows 1..N-1   (bit i)
//   first_c  C(i, 0) for rows 1..N-2   (bit i): the c_in of row i+1's first cell
//   last_s   S(N-1, j) for j = 1..N-1  (bit j)
//   last_c   C(N-1, j) for j = 0..N-2  (bit j)
// Purely combinational.
module oba_array #(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         p0,
  output logic [N-1:1] first_s,
  output logic [N-2:1] first_c,
  output logic [N-1:1] last_s,
  output logic [N-2:0] last_c
);

  import oba_pkg::*;

  // Row i's generate block holds s[j] = S(i, j) and c[j] = C(i, j); column
  // N-1 holds the left-edge partial product and the zero carry entering the
  // last column.
  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] s;
    logic [N-1:0] c;
    if (i == 0) begin : g_pp
      assign s = x[0] ? y : '0;
      assign c = '0;
    end else begin : g_cells
      assign s[N-1] = x[i] & y[N-1];
      assign c[N-1] = 1'b0;
      for (genvar j = 0; j < N - 1; j++) begin : g_col
        if (cell_kind(i, j, N) == CELL_TDBA) begin : g_tdba
          tdba u_cell (
            .c    (g_row[i-1].c[j+1]),
            .x    (x[i]),
            .y    (y[j]),
            .s_in (g_row[i-1].s[j+1]),
            .c_in (g_row[i-1].c[j]),
            .c_out(c[j]),
            .s_out(s[j])
          );
          // The placement rule: a column-bypassed TDBA outside the first
          // column must never be handed a carry, since it would drop it.
          if (j != 0) begin : g_no_lost_carry
            always_comb begin
              assert final (!(x[i] && !y[j] && g_row[i-1].c[j]))
                else $error("carry dropped by the TDBA in row %0d, column %0d", i, j);
            end
          end
        end else begin : g_mrba
          mrba u_cell (
            .c    (g_row[i-1].c[j+1]),
            .x    (x[i]),
            .y    (y[j]),
            .s_in (g_row[i-1].s[j+1]),
            .c_in (g_row[i-1].c[j]),
            .c_out(c[j]),
            .s_out(s[j])
          );
        end
      end
    end
  end

  assign p0 = g_row[0].s[0];

  for (genvar i = 1; i < N; i++) begin : g_first_s
    assign first_s[i] = g_row[i].s[0];
  end
  for (genvar i = 1; i < N - 1; i++) begin : g_first_c
    assign first_c[i] = g_row[i].c[0];
  end

  assign last_s = g_row[N-1].s[N-1:1];
  assign last_c = g_row[N-1].c[N-2:0];

endmodule
