// tb_oba_multiplier_sizes: checks that the OBA cell-placement rule stays exact
// when the multiplier is built at sizes other than the 8 x 8 default.
//
// Four instances, N = 4, 5 and 6 (all operand pairs) and N = 12 (30000 random
// pairs), are compared with x * y. Ends with a TB_RESULT line; a watchdog stops
// a hung run.
module tb_oba_multiplier_sizes;

  int checks = 0;
  int failures = 0;

  logic [3:0]  x4, y4;
  logic [7:0]  p4;
  logic [4:0]  x5, y5;
  logic [9:0]  p5;
  logic [5:0]  x6, y6;
  logic [11:0] p6;
  logic [11:0] x12, y12;
  logic [23:0] p12;

  oba_multiplier #(.N(4))  dut4  (.x(x4),  .y(y4),  .p(p4));
  oba_multiplier #(.N(5))  dut5  (.x(x5),  .y(y5),  .p(p5));
  oba_multiplier #(.N(6))  dut6  (.x(x6),  .y(y6),  .p(p6));
  oba_multiplier #(.N(12)) dut12 (.x(x12), .y(y12), .p(p12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input longint unsigned a, input longint unsigned b,
                       input longint unsigned got);
    checks++;
    if (got != a * b) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d: %0d * %0d gave %0d", n, a, b, got);
    end
  endtask

  initial begin : stimulus
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1 check(4, 64'(x4), 64'(y4), 64'(p4));
    end
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1 check(5, 64'(x5), 64'(y5), 64'(p5));
    end
    for (int v = 0; v < 4096; v++) begin
      {x6, y6} = 12'(v);
      #1 check(6, 64'(x6), 64'(y6), 64'(p6));
    end
    for (int v = 0; v < 30000; v++) begin
      x12 = 12'($urandom);
      y12 = 12'($urandom);
      #1 check(12, 64'(x12), 64'(y12), 64'(p12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
