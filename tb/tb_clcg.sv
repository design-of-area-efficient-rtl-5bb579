// tb_clcg: self-check of the coupled LCG pair at its defaults (32 bits,
// multipliers 5 and 9). A software model steps both recurrences; on every
// clock after start the two states and the comparator bit
// (x(i+1) > y(i+1)) are compared with it. Both values of the bit must be
// seen; start is raised again with new seeds several times.
module tb_clcg;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   ones = 0, zeros = 0;

  always #5 clk = ~clk;

  logic        rst_n, start, bit_o;
  logic [31:0] x0, y0, b1, b2, x, y;
  logic [31:0] mx, my;

  clcg dut (.clk, .rst_n, .start, .x0, .y0, .b1, .b2, .x, .y, .bit_o);

  task automatic tick();
    logic [31:0] sx, sy;
    sx = start ? x0 : mx;
    sy = start ? y0 : my;
    @(posedge clk);
    mx = sx * 32'd5 + b1;
    my = sy * 32'd9 + b2;
    @(negedge clk);
  endtask

  task automatic check();
    checks += 3;
    if (x !== mx) begin failures++; if (failures < 10) $display("FAIL x %h exp %h", x, mx); end
    if (y !== my) begin failures++; if (failures < 10) $display("FAIL y %h exp %h", y, my); end
    if (bit_o !== (mx > my)) begin
      failures++;
      if (failures < 10) $display("FAIL bit %0d x=%h y=%h", bit_o, mx, my);
    end
    if (bit_o) ones++; else zeros++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    x0 = 32'h1; y0 = 32'h1; b1 = 32'h1; b2 = 32'h3;
    mx = '0; my = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 10; run++) begin
      if (run > 0) begin
        x0 = $urandom; y0 = $urandom; b1 = $urandom | 1; b2 = $urandom | 1;
      end
      start = 1'b1;
      tick();
      start = 1'b0;
      check();
      for (int i = 0; i < 1000; i++) begin
        tick();
        check();
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("FAIL comparator bit never took both values: ones=%0d zeros=%0d", ones, zeros);
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
