// tb_mdclcg: end-to-end self-check of the modified dual-CLCG generator with
// every parameter at its default (32-bit LCGs, multipliers 5, 9, 17, 33).
//
// A software model steps the four recurrences and forms
// z = (x > y) ^ (p > q). The run starts from reset with all seeds 1, then
// restarts several times from random seeds and odd increments, and once
// resets in mid-stream. On every clock the testbench checks z and valid
// against the model, so the output rate of one bit per clock and the
// one-clock latency from start are checked on every bit. It counts how often
// each mechanism happened (seed load by start, restart while running,
// reset while running, B and C at each value, z at each value) and counts a
// failure for any that never did. It also checks that the share of ones in
// the generated stream lies between 45 and 55 percent.
module tb_mdclcg;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        rst_n, start, z, valid;
  logic [31:0] x0, y0, p0, q0, b1, b2, b3, b4;
  logic [31:0] mx, my, mp, mq;
  logic        mvalid;

  int n_start = 0, n_restart = 0, n_reset = 0;
  int n_b1 = 0, n_b0 = 0, n_c1 = 0, n_c0 = 0, n_z1 = 0, n_z0 = 0;

  mdclcg dut (.clk, .rst_n, .start, .x0, .y0, .p0, .q0, .b1, .b2, .b3, .b4, .z, .valid);

  task automatic tick();
    logic [31:0] sx, sy, sp, sq;
    sx = start ? x0 : mx;
    sy = start ? y0 : my;
    sp = start ? p0 : mp;
    sq = start ? q0 : mq;
    if (start) begin
      n_start++;
      if (mvalid) n_restart++;
    end
    @(posedge clk);
    mx = sx * 32'd5  + b1;
    my = sy * 32'd9  + b2;
    mp = sp * 32'd17 + b3;
    mq = sq * 32'd33 + b4;
    if (start) mvalid = 1'b1;
    @(negedge clk);
  endtask

  task automatic check();
    logic bb, cc;
    bb = mx > my;
    cc = mp > mq;
    checks++;
    if (valid !== mvalid) begin
      failures++;
      if (failures < 10) $display("FAIL valid %0d exp %0d", valid, mvalid);
    end
    if (mvalid) begin
      checks++;
      if (z !== (bb ^ cc)) begin
        failures++;
        if (failures < 10) $display("FAIL z %0d exp %0d", z, bb ^ cc);
      end
      if (bb) n_b1++; else n_b0++;
      if (cc) n_c1++; else n_c0++;
      if (z)  n_z1++; else n_z0++;
    end
  endtask

  task automatic run(input int unsigned nbits);
    start = 1'b1;
    tick();
    start = 1'b0;
    check();
    for (int unsigned i = 1; i < nbits; i++) begin
      tick();
      check();
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-24s %0d", what, n);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    x0 = 32'h1; y0 = 32'h1; p0 = 32'h1; q0 = 32'h1;
    b1 = 32'h1; b2 = 32'h3; b3 = 32'h5; b4 = 32'h7;
    mx = '0; my = '0; mp = '0; mq = '0; mvalid = 1'b0;
    @(negedge clk);
    check();
    rst_n = 1'b1;
    repeat (3) begin tick(); check(); end   // idle: valid must stay 0

    run(2000);                               // all seeds 1
    for (int k = 0; k < 8; k++) begin        // restarts while running
      x0 = $urandom; y0 = $urandom; p0 = $urandom; q0 = $urandom;
      b1 = $urandom | 1; b2 = $urandom | 1; b3 = $urandom | 1; b4 = $urandom | 1;
      run(2000);
    end

    // Reset in mid-stream: state and valid clear.
    rst_n = 1'b0;
    #1;
    mx = '0; my = '0; mp = '0; mq = '0; mvalid = 1'b0;
    n_reset++;
    @(negedge clk);
    check();
    rst_n = 1'b1;
    run(1000);

    $display("mechanism counts:");
    need("seed load (start)", n_start);
    need("restart while running", n_restart);
    need("reset while running", n_reset);
    need("B = 1", n_b1);
    need("B = 0", n_b0);
    need("C = 1", n_c1);
    need("C = 0", n_c0);
    need("z = 1", n_z1);
    need("z = 0", n_z0);
    checks++;
    if (n_z1 * 100 < (n_z1 + n_z0) * 45 || n_z1 * 100 > (n_z1 + n_z0) * 55) begin
      failures++;
      $display("FAIL share of ones %0d of %0d", n_z1, n_z1 + n_z0);
    end
    $display("ones %0d of %0d bits", n_z1, n_z1 + n_z0);
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
