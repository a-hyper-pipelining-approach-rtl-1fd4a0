// tb_hybrid_multiplier_full: the multiplier exactly as delivered, with every parameter at its
// default (32-bit operands, double-edge combined pipe memory).
// It runs corner-case and random multiplications back to back, compares each product with
// a * b worked out in the testbench, and checks the latency of N+1 = 33 clock periods
// (66 steps, one per clock edge).
module tb_hybrid_multiplier_full;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst = 1'b0, start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic busy, done;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  hybrid_multiplier dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b), .busy(busy), .done(done), .p(p)
  );

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

  task automatic multiply(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] expect_p;
    int unsigned r0;
    expect_p = {{N{1'b0}}, av} * {{N{1'b0}}, bv};
    a = av; b = bv; start = 1'b1;
    r0 = rises;
    @(posedge clk or negedge clk); #1;
    start = 1'b0;
    while (!done && (rises - r0) < 200) begin
      @(posedge clk or negedge clk); #1;
    end
    check(p == expect_p, $sformatf("%h * %h = %h, got %h", av, bv, expect_p, p));
    check((rises - r0) == N + 1, $sformatf("latency %0d clock periods", rises - r0));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1 check(!busy && !done && p == '0, "reset");
    @(negedge clk); #1 rst = 1'b0;
    @(posedge clk); #1;
    multiply('1, '1);
    multiply('0, 32'h89ab_cdef);
    multiply(32'h1, 32'h1);
    multiply(32'h7fff_ffff, 32'h8000_0001);
    for (int i = 0; i < 30; i++) multiply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
