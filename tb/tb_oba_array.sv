// tb_oba_array: exhaustive self-checking test of the 8 x 8 cell array.
//
// For all 65536 operand pairs every array output (p0, the first-column sums
// and carries, the last row's sums and carries) is compared bit for bit with
// the cell-by-cell reference model in oba_ref_pkg. As a check that does not
// rely on the model, the outputs combined with the recovered first-column
// carries must also add up to x * y. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_oba_array;

  import oba_ref_pkg::*;

  localparam int N = 8;

  logic [N-1:0] x, y;
  logic         p0;
  logic [N-1:1] first_s;
  logic [N-2:1] first_c;
  logic [N-1:1] last_s;
  logic [N-2:0] last_c;
  int           checks = 0;
  int           failures = 0;

  oba_array #(.N(N)) dut (.x(x), .y(y), .p0(p0), .first_s(first_s), .first_c(first_c),
                          .last_s(last_s), .last_c(last_c));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    grid_t   g;
    events_t ev;
    bit      ok;
    longint unsigned total;
    ev = '{default: 0};
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1;
      ref_grid(N, 64'(x), 64'(y), g, ev);
      ok = (p0 == g.s[0][0]);
      for (int i = 1; i < N; i++) ok &= (first_s[i] == g.s[i][0]);
      for (int i = 1; i < N - 1; i++) ok &= (first_c[i] == g.c[i][0]);
      for (int j = 1; j < N; j++) ok &= (last_s[j] == g.s[N-1][j]);
      for (int j = 0; j < N - 1; j++) ok &= (last_c[j] == g.c[N-1][j]);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h: array outputs differ from the model", x, y);
      end
      // arithmetic check from the DUT's own outputs
      total = 64'(p0);
      for (int i = 1; i < N; i++) begin
        total += 64'(first_s[i]) << i;
        if (i >= 2 && first_c[i-1] && !(x[i] && y[0])) total += 64'd1 << i;
      end
      total += 64'(last_s) << N;
      total += 64'(last_c) << N;
      checks++;
      if (total != 64'(x) * 64'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h: outputs sum to %0d", x, y, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
