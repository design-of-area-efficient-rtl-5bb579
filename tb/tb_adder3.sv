// tb_adder3: self-check of the 32-bit three-operand modulo-2^32 adder at its
// default width. Directed cases (all ones, carries out of the top bit that
// must be dropped) and random operands are applied; y is compared with
// (a + b + c) mod 2^32 computed by the testbench. A 16-bit instance is
// checked as well.
module tb_adder3;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [31:0] a, b, c, y;
  logic [15:0] a16, b16, c16, y16;

  adder3 dut (.a(a), .b(b), .c(c), .y(y));
  adder3 #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .c(c16), .y(y16));

  task automatic apply(input logic [31:0] ia, input logic [31:0] ib, input logic [31:0] ic);
    logic [31:0] exp;
    a = ia; b = ib; c = ic;
    a16 = ia[15:0]; b16 = ib[15:0]; c16 = ic[15:0];
    #1;
    exp = ia + ib + ic;
    checks += 2;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%h got %h exp %h", ia, ib, ic, y, exp);
    end
    if (y16 !== exp[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h+%h+%h got %h exp %h", ia[15:0], ib[15:0], ic[15:0], y16, exp[15:0]);
    end
  endtask

  initial begin
    apply('1, '1, '1);
    apply('1, 32'h1, 32'h0);
    apply('1, '1, 32'h2);
    apply(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    apply('0, '0, '0);
    for (int i = 0; i < 32; i++) apply(32'(1) << i, 32'(1) << i, 32'(1) << i);
    for (int i = 0; i < 30000; i++) apply($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
