// tb_lcg: self-check of the 32-bit LCG (default R = 2, a = 5) and of a
// second instance with R = 5 (a = 33). After reset q must be 0. Start
// loads a seed: one clock later q must equal a*seed + b mod 2^32, and on every
// following clock q must advance one step of the recurrence (one new number
// per clock). The increment is changed and start is raised again mid-run.
// The expected values are computed with ordinary multiplication.
module tb_lcg;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        rst_n, start;
  logic [31:0] seed, b, q2, q5;
  logic [31:0] m2, m5;   // model states

  lcg dut2 (.clk, .rst_n, .start, .seed, .b, .q(q2));
  lcg #(.R(5)) dut5 (.clk, .rst_n, .start, .seed, .b, .q(q5));

  function automatic logic [31:0] step(input logic [31:0] s, input int unsigned r,
                                       input logic [31:0] inc);
    return s * ((32'(1) << r) + 32'(1)) + inc;
  endfunction

  task automatic check(input string what);
    checks += 2;
    if (q2 !== m2) begin
      failures++;
      if (failures < 10) $display("FAIL %s R=2 got %h exp %h", what, q2, m2);
    end
    if (q5 !== m5) begin
      failures++;
      if (failures < 10) $display("FAIL %s R=5 got %h exp %h", what, q5, m5);
    end
  endtask

  // One clock: model follows the same multiplexer rule as the design.
  task automatic tick();
    logic [31:0] s2, s5;
    s2 = start ? seed : m2;
    s5 = start ? seed : m5;
    @(posedge clk);
    m2 = step(s2, 2, b);
    m5 = step(s5, 5, b);
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; seed = 32'h1; b = 32'h1;
    m2 = '0; m5 = '0;
    @(negedge clk);
    check("reset");
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      seed  = (run == 0) ? 32'h1 : $urandom;
      b     = ($urandom | 32'h1);
      start = 1'b1;
      tick();
      start = 1'b0;
      check("first step after start");
      for (int i = 0; i < 500; i++) begin
        tick();
        check("free-running step");
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
