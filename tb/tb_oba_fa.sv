// tb_oba_fa: exhaustive self-checking test of the one-bit full adder: for all
// eight inputs, {co, s} must equal a + b + ci. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_oba_fa;

  logic a, b, ci, s, co;
  int   checks = 0;
  int   failures = 0;

  oba_fa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (int'({co, s}) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b: got co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
