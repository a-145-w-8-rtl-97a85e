// tb_oba_multiplier: end-to-end test of the 8 x 8 OBA multiplier at its
// default size (no parameter override).
//
// All 65536 operand pairs are applied. Each product is checked against x * y
// and against the product assembled by the cell-level reference model in
// oba_ref_pkg. The model also counts how often each mechanism of the
// architecture fired - row bypass, TDBA column bypass, TDBA evaluation, MRBA
// evaluation, an MRBA keeping a carry that a TDBA would have dropped (the
// carry problem the MRBA exists for), and carry recovery on the right edge -
// and a mechanism that never fired counts as a failure. The multiplier is
// combinational; each product is sampled one time step after the operands
// change. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_oba_multiplier;

  import oba_ref_pkg::*;

  localparam int N = 8;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int             checks = 0;
  int             failures = 0;

  oba_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input longint count);
    $display("  %-34s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : stimulus
    grid_t   g;
    events_t ev;
    longint unsigned model_p;
    ev = '{default: 0};
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1;
      ref_grid(N, 64'(x), 64'(y), g, ev);
      model_p = ref_product(N, 64'(x), 64'(y), g, ev);
      checks++;
      if (64'(p) != 64'(x) * 64'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
      end
      checks++;
      if (model_p != 64'(x) * 64'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL reference model %0d * %0d: got %0d", x, y, model_p);
      end
    end
    $display("mechanism counts over all operand pairs:");
    need("row bypass (x[i] = 0)", ev.row_bypass);
    need("TDBA column bypass (y[j] = 0)", ev.tdba_col_bypass);
    need("TDBA evaluation", ev.tdba_eval);
    need("MRBA evaluation", ev.mrba_eval);
    need("MRBA keeps a carry a TDBA would lose", ev.carry_kept);
    need("edge carry recovery", ev.edge_recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
