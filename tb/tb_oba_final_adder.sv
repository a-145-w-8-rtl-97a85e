// tb_oba_final_adder: exhaustive self-checking test of the final adder row at
// N = 8. Every combination of the 7 sums, 7 carries and the incoming carry
// (2^15 cases) is applied; the 8 output bits must equal the integer sum
// last_s[7:1] + last_c[6:0] + ci. Ends with a TB_RESULT line; a watchdog stops
// a hung run.
module tb_oba_final_adder;

  localparam int N = 8;

  logic [N-1:1] last_s;
  logic [N-2:0] last_c;
  logic         ci;
  logic [N-1:0] p;
  int           checks = 0;
  int           failures = 0;

  oba_final_adder #(.N(N)) dut (.last_s(last_s), .last_c(last_c), .ci(ci), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int expected;
    for (int v = 0; v < (1 << (2 * N - 1)); v++) begin
      {last_s, last_c, ci} = (2 * N - 1)'(v);
      #1;
      expected = int'(last_s) + int'(last_c) + int'(ci);
      checks++;
      if (int'(p) != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL last_s=%h last_c=%h ci=%b: got %0d expected %0d",
                   last_s, last_c, ci, p, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
