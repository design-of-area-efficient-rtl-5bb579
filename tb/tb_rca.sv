// tb_rca: exhaustive self-check of the ripple carry adder at the default
// width (2) and at 5 bits, the widest block of a 16-bit square-root
// carry-select adder. Every a, b, cin combination is applied and
// {cout, sum} is compared with a + b + cin computed by the testbench.
module tb_rca;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;

  rca dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));
  rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a2, b2, c2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2 + b2 + c2)) begin
        failures++;
        $display("FAIL w2 a=%0d b=%0d cin=%0d got %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int i = 0; i < 2048; i++) begin
      {a5, b5, c5} = 11'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(a5 + b5 + c5)) begin
        failures++;
        if (failures < 10) $display("FAIL w5 a=%0d b=%0d cin=%0d got %0d", a5, b5, c5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
