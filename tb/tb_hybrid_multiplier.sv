// tb_hybrid_multiplier: end-to-end test of the 32-bit hybrid multiplier in all four storage
// styles (SET/DET x separate/combined pipe memory), each a full-width instance run by its own
// process.
// Every operation loads a and b with start, waits for done, and compares p with a * b worked
// out in the testbench. It also checks the latency: 2N+2 = 66 steps, which is 66 clock periods
// in the single-edge styles and 33 in the double-edge styles. The test counts each mechanism
// of the design and fails if one never happened:
//   ops            multiplications completed, per style
//   back_to_back   a new start accepted straight from DONE
//   busy_ignored   a start pulse during an operation that had no effect
//   reset_abort    a reset in the middle of an operation, followed by a correct product
//   half_rate      DET operations that took half the clock periods of SET ones
//   carry_heavy    all-ones operands, which keep every pipe's carry loop busy
module tb_hybrid_multiplier;
  import hm_pkg::*;
  localparam int unsigned N = 32;
  localparam mem_style_e STYLES[4] = '{MEM_SET_SEP, MEM_SET_COMB, MEM_DET_SEP, MEM_DET_COMB};

  logic clk = 1'b0;
  logic [3:0] rst = '0, start = '0, busy, done;
  logic [N-1:0] a[4], b[4];
  logic [2*N-1:0] p[4];
  int checks = 0, failures = 0;
  int ops[4] = '{0, 0, 0, 0};
  int back_to_back = 0, busy_ignored = 0, reset_abort = 0, half_rate = 0, carry_heavy = 0;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    hybrid_multiplier #(.N(N), .MEM(STYLES[k])) dut (
      .clk(clk), .rst(rst[k]), .start(start[k]), .a(a[k]), .b(b[k]),
      .busy(busy[k]), .done(done[k]), .p(p[k])
    );
  end

  always #5 clk = ~clk;
  int unsigned rises = 0;
  always @(posedge clk) rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic step(input int k);
    if (mem_is_det(STYLES[k])) @(posedge clk or negedge clk);
    else                       @(posedge clk);
    #1;
  endtask

  // One multiplication on instance k. poke: pulse start again while busy.
  task automatic multiply(input int k, input logic [N-1:0] av, input logic [N-1:0] bv,
                          input bit poke);
    logic [2*N-1:0] expect_p;
    int steps;
    int unsigned r0;
    bit det;
    det = mem_is_det(STYLES[k]);
    expect_p = {{N{1'b0}}, av} * {{N{1'b0}}, bv};
    if (done[k]) back_to_back++;
    a[k] = av; b[k] = bv; start[k] = 1'b1;
    r0 = rises;
    step(k);
    start[k] = 1'b0;
    a[k] = $urandom; b[k] = $urandom;   // inputs are free once loaded
    steps = 1;
    while (!done[k] && steps < 500) begin
      if (poke && steps == 20) start[k] = 1'b1;
      step(k);
      start[k] = 1'b0;
      steps++;
    end
    check(p[k] == expect_p, $sformatf("style %0d: %h * %h = %h, got %h", k, av, bv, expect_p, p[k]));
    check(steps == 2 * N + 2, $sformatf("style %0d: latency %0d steps", k, steps));
    check((rises - r0) == (det ? N + 1 : 2 * N + 2),
          $sformatf("style %0d: latency %0d clock periods", k, rises - r0));
    if (det && (rises - r0) == N + 1) half_rate++;
    if (poke && p[k] == expect_p && steps == 2 * N + 2) busy_ignored++;
    if (av == '1 && bv == '1 && p[k] == expect_p) carry_heavy++;
    ops[k]++;
    // the product must hold while done is high
    step(k); step(k);
    check(done[k] && p[k] == expect_p, $sformatf("style %0d: product held", k));
  endtask

  task automatic run_style(input int k);
    // reset this instance
    #1 rst[k] = 1'b1;
    #1 check(!busy[k] && !done[k] && p[k] == '0, $sformatf("style %0d: reset", k));
    @(negedge clk); #1 rst[k] = 1'b0;
    @(posedge clk); #1;
    multiply(k, '1, '1, 1'b0);
    multiply(k, '0, '1, 1'b0);
    multiply(k, 32'h1, 32'hffff_fffe, 1'b1);
    multiply(k, 32'h8000_0000, 32'h8000_0000, 1'b0);
    multiply(k, 32'hffff_0000, 32'h0000_ffff, 1'b0);
    for (int i = 0; i < 12; i++) multiply(k, $urandom, $urandom, (i % 4) == 1);
    // reset in the middle of an operation, then a clean operation
    a[k] = $urandom; b[k] = $urandom; start[k] = 1'b1;
    step(k); start[k] = 1'b0;
    repeat (17) step(k);
    rst[k] = 1'b1;
    #1 check(!busy[k] && !done[k] && p[k] == '0, $sformatf("style %0d: reset aborts", k));
    @(negedge clk); #1 rst[k] = 1'b0;
    @(posedge clk); #1;
    multiply(k, 32'hcafe_f00d, 32'h1357_9bdf, 1'b0);
    if (p[k] == 64'(32'hcafe_f00d) * 64'(32'h1357_9bdf)) reset_abort++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin a[k] = '0; b[k] = '0; end
    fork
      run_style(0);
      run_style(1);
      run_style(2);
      run_style(3);
    join
    for (int k = 0; k < 4; k++) begin
      $display("style %0d: %0d operations", k, ops[k]);
      check(ops[k] > 0, $sformatf("style %0d never ran", k));
    end
    $display("back_to_back=%0d busy_ignored=%0d reset_abort=%0d half_rate=%0d carry_heavy=%0d",
             back_to_back, busy_ignored, reset_abort, half_rate, carry_heavy);
    check(back_to_back > 0, "back-to-back start never happened");
    check(busy_ignored > 0, "start while busy never exercised");
    check(reset_abort == 4, "reset mid-operation not exercised in every style");
    check(half_rate > 0, "double-edge half-rate operation never observed");
    check(carry_heavy == 4, "all-ones operands not multiplied in every style");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
