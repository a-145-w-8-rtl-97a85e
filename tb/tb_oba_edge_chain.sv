// tb_oba_edge_chain: exhaustive self-checking test of the edge recovery chain
// at N = 8 (2^19 input combinations).
//
// Reference: row i's first cell absorbs its incoming carry first_c[i-1] only
// when x[i] & y0 = 1; otherwise that carry has to be added at weight i. The
// chain's outputs {co, p[7:2]} must therefore equal
//   sum over i = 2..7 of (first_s[i] + (carry not absorbed)) * 2^(i-2).
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_oba_edge_chain;

  localparam int N = 8;

  logic [N-1:2] x;
  logic         y0;
  logic [N-1:2] first_s;
  logic [N-2:1] first_c;
  logic [N-1:2] p;
  logic         co;
  int           checks = 0;
  int           failures = 0;
  int           recovered = 0;

  oba_edge_chain #(.N(N)) dut (.x(x), .y0(y0), .first_s(first_s), .first_c(first_c),
                               .p(p), .co(co));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int expected;
    bit absorbed;
    for (int v = 0; v < (1 << (3 * (N - 2) + 1)); v++) begin
      {x, y0, first_s, first_c} = (3 * (N - 2) + 1)'(v);
      #1;
      expected = 0;
      for (int i = 2; i < N; i++) begin
        absorbed = (x[i] == 1'b1) && (y0 == 1'b1);
        expected += int'(first_s[i]) << (i - 2);
        if (first_c[i-1] && !absorbed) begin
          expected += 1 << (i - 2);
          recovered++;
        end
      end
      checks++;
      if (int'({co, p}) != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%b y0=%b first_s=%b first_c=%b: got %0d expected %0d",
                   x, y0, first_s, first_c, {co, p}, expected);
      end
    end
    if (recovered == 0) failures++;
    $display("recovered carries: %0d", recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
