// tb_mrba: exhaustive self-checking test of the MRBA cell.
//
// All 32 combinations of (c, x, y, s_in, c_in) are applied. With x = 0 the cell
// must pass c and s_in; with x = 1 it must output the two-bit sum
// (x & y) + s_in + c_in, whatever y is. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_mrba;

  logic c, x, y, s_in, c_in;
  logic c_out, s_out;
  int   checks = 0;
  int   failures = 0;

  mrba dut (.c(c), .x(x), .y(y), .s_in(s_in), .c_in(c_in), .c_out(c_out), .s_out(s_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int   total;
    logic exp_c, exp_s;
    for (int v = 0; v < 32; v++) begin
      {c, x, y, s_in, c_in} = 5'(v);
      #1;
      if (!x) begin
        exp_c = c;
        exp_s = s_in;
      end else begin
        total = int'(y) + int'(s_in) + int'(c_in);
        exp_c = total >= 2;
        exp_s = (total % 2) == 1;
      end
      checks++;
      if (c_out !== exp_c || s_out !== exp_s) begin
        failures++;
        $display("FAIL c=%b x=%b y=%b s_in=%b c_in=%b: got c_out=%b s_out=%b, expected %b %b",
                 c, x, y, s_in, c_in, c_out, s_out, exp_c, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
