// tb_tdba: exhaustive self-checking test of the TDBA cell.
//
// All 32 combinations of (c, x, y, s_in, c_in) are applied and both outputs are
// compared with the cell's truth table, written here as a case on (x, y):
// row bypass, column bypass (carry forced to 0) and evaluation of
// 1 + s_in + c_in. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_tdba;

  logic c, x, y, s_in, c_in;
  logic c_out, s_out;
  int   checks = 0;
  int   failures = 0;

  tdba dut (.c(c), .x(x), .y(y), .s_in(s_in), .c_in(c_in), .c_out(c_out), .s_out(s_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic exp_c, exp_s;
    for (int v = 0; v < 32; v++) begin
      {c, x, y, s_in, c_in} = 5'(v);
      #1;
      unique case ({x, y})
        2'b00, 2'b01: begin exp_c = c;    exp_s = s_in; end
        2'b10:        begin exp_c = 1'b0; exp_s = s_in; end
        2'b11: begin
          // 1 + s_in + c_in as a two-bit number
          exp_c = (32'(s_in) + 32'(c_in) + 1) >= 2;
          exp_s = ((32'(s_in) + 32'(c_in) + 1) % 2) == 1;
        end
      endcase
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
