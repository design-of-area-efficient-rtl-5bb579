// tb_srcsa: self-check of the square-root carry-select adder at its default
// width (16 bits, blocks 2-2-3-4-5) and at 32 bits. Directed cases make a
// carry ripple across every block boundary in both directions of the
// selection; random cases follow. {cout, sum} is compared with a + b + cin.
module tb_srcsa;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [31:0] a32, b32, s32;
  logic        c32, co32;

  srcsa dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  srcsa #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));

  task automatic apply16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16 = c;
    #1;
    exp = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h+%h+%0d got %h exp %h", a, b, c, {co16, s16}, exp);
    end
  endtask

  task automatic apply32(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [32:0] exp;
    a32 = a; b32 = b; c32 = c;
    #1;
    exp = 33'(a) + 33'(b) + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL32 %h+%h+%0d got %h exp %h", a, b, c, {co32, s32}, exp);
    end
  endtask

  initial begin
    // Full carry propagation and its absence.
    apply16(16'hFFFF, 16'h0000, 1'b1);
    apply16(16'hFFFF, 16'h0001, 1'b0);
    apply16(16'hFFFF, 16'hFFFF, 1'b1);
    apply16(16'h0000, 16'h0000, 1'b0);
    apply32(32'hFFFF_FFFF, 32'h0, 1'b1);
    apply32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    // A carry generated just below each bit position, ripple into the rest.
    for (int i = 0; i < 16; i++) begin
      apply16(16'hFFFF >> i, 16'h1, 1'b0);
      apply16(16'(1) << i, 16'(1) << i, 1'b0);
      apply16(~(16'(1) << i), 16'h0, 1'b1);
    end
    for (int i = 0; i < 32; i++) begin
      apply32(32'hFFFF_FFFF >> i, 32'h1, 1'b0);
      apply32(32'(1) << i, 32'(1) << i, 1'b1);
    end
    for (int i = 0; i < 20000; i++) begin
      apply16(16'($urandom), 16'($urandom), 1'($urandom));
      apply32($urandom, $urandom, 1'($urandom));
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
