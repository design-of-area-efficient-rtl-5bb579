// tb_mag_comp: self-check of the 32-bit magnitude comparator: equal
// operands, operands differing in a single bit in either direction, extreme
// values and random pairs; gt is compared with a > b.
module tb_mag_comp;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic        gt;

  mag_comp dut (.a(a), .b(b), .gt(gt));

  task automatic apply(input logic [31:0] ia, input logic [31:0] ib);
    a = ia; b = ib;
    #1;
    checks++;
    if (gt !== (ia > ib)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h gt=%0d", ia, ib, gt);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int i = 0; i < 32; i++) begin
      apply(32'(1) << i, 32'h0);
      apply(32'h0, 32'(1) << i);
      apply(32'(1) << i, 32'(1) << i);
      apply(32'hFFFF_FFFF >> i, 32'(1) << (31 - i));
    end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] r;
      r = $urandom;
      apply(r, $urandom);
      apply(r, r);
      apply(r, r ^ (32'(1) << (i % 32)));
    end
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
