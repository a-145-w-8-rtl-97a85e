// tb_oba_random_workload: the power-measurement workload of the 8 x 8 OBA
// multiplier - operands whose bits are 0 or 1 with probability 50 %, applied
// at a 50 MHz input rate (one new pair every 20 ns).
//
// 20000 random operand pairs are applied, one per 20 ns period; the product is
// sampled at the end of each period and checked against x * y. With the
// reference model in oba_ref_pkg the test also reports the share of array
// cells whose evaluation is switched off (bypassed by row or by column), the
// quantity the architecture trades for power, and checks that about half of
// the rows are bypassed, as the input statistics imply. The multiplier has no
// clock; the period only spaces the input changes. Ends with a TB_RESULT line;
// a watchdog stops a hung run.
module tb_oba_random_workload;

  timeunit 1ns;
  timeprecision 1ps;

  import oba_ref_pkg::*;

  localparam int      N       = 8;
  localparam int      VECTORS = 20000;
  localparam realtime PERIOD  = 20.0ns;   // 50 MHz input rate

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int             checks = 0;
  int             failures = 0;

  oba_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #(PERIOD * (VECTORS + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    grid_t   g;
    events_t ev;
    longint  cells;
    real     row_share, off_share;
    ev = '{default: 0};
    for (int v = 0; v < VECTORS; v++) begin
      x = N'($urandom);
      y = N'($urandom);
      #(PERIOD);
      ref_grid(N, 64'(x), 64'(y), g, ev);
      checks++;
      if (64'(p) != 64'(x) * 64'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
      end
    end
    cells     = longint'(VECTORS) * longint'((N - 1) * (N - 1));
    row_share = real'(ev.row_bypass) / real'(cells);
    off_share = real'(ev.row_bypass + ev.tdba_col_bypass) / real'(cells);
    $display("cells bypassed by row:              %5.1f %%", 100.0 * row_share);
    $display("cells with evaluation switched off: %5.1f %%", 100.0 * off_share);
    $display("elapsed: %0.0f ns for %0d products", $realtime, VECTORS);
    checks++;
    if (row_share < 0.47 || row_share > 0.53) begin
      failures++;
      $display("FAIL row-bypass share %f is not near 0.5", row_share);
    end
    checks++;
    if (ev.tdba_col_bypass == 0 || ev.carry_kept == 0) begin
      failures++;
      $display("FAIL column bypass or carry keeping never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
