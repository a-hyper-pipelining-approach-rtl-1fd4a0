// tb_ptsc: self-checking test of the parallel-to-serial converter.
// A 32-bit double-edge converter (stepped on every edge) and an 8-bit single-edge converter
// (stepped on rising edges) are loaded with random operands. After the load step, a_ser must
// give bits 0 .. N-1 of a, least significant first, and then zeros. b_hold must keep b
// throughout. A second load must replace both operands even when it comes before the first
// operand has been fully shifted out.
module tb_ptsc;
  localparam int unsigned NW = 32;
  localparam int unsigned NN = 8;

  logic clk = 1'b0, rst = 1'b0;
  logic ld_w = 1'b0, ld_n = 1'b0;
  logic [NW-1:0] a_w = '0, b_w = '0, bh_w;
  logic [NN-1:0] a_n = '0, b_n = '0, bh_n;
  logic s_w, s_n;
  int checks = 0, failures = 0;

  ptsc #(.N(NW), .DET(1'b1)) dut_w (
    .clk(clk), .rst(rst), .load(ld_w), .a(a_w), .b(b_w), .a_ser(s_w), .b_hold(bh_w)
  );
  ptsc #(.N(NN), .DET(1'b0)) dut_n (
    .clk(clk), .rst(rst), .load(ld_n), .a(a_n), .b(b_n), .a_ser(s_n), .b_hold(bh_n)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic step(input bit det);
    if (det) @(posedge clk or negedge clk);
    else     @(posedge clk);
    #1;
  endtask

  // Load a and b, then follow the serial stream for nsteps steps.
  task automatic run_w(input logic [NW-1:0] a, input logic [NW-1:0] b, input int nsteps);
    a_w = a; b_w = b; ld_w = 1'b1;
    step(1'b1);
    ld_w = 1'b0; a_w = ~a; b_w = ~b;  // the inputs may change after the load
    for (int k = 0; k < nsteps; k++) begin
      check(s_w == ((k < NW) ? a[k] : 1'b0), $sformatf("DET serial bit %0d of %h", k, a));
      check(bh_w == b, "DET multiplicand held");
      step(1'b1);
    end
  endtask

  task automatic run_n(input logic [NN-1:0] a, input logic [NN-1:0] b, input int nsteps);
    a_n = a; b_n = b; ld_n = 1'b1;
    step(1'b0);
    ld_n = 1'b0; a_n = ~a; b_n = ~b;
    for (int k = 0; k < nsteps; k++) begin
      check(s_n == ((k < NN) ? a[k] : 1'b0), $sformatf("SET serial bit %0d of %h", k, a));
      check(bh_n == b, "SET multiplicand held");
      step(1'b0);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1 check(s_w == 1'b0 && s_n == 1'b0 && bh_w == '0 && bh_n == '0, "reset clears");
    @(negedge clk); #1 rst = 1'b0;
    @(posedge clk); #1;
    run_w('1, 32'h0f0f_0f0f, 2 * NW);
    for (int i = 0; i < 10; i++) run_w($urandom, $urandom, 2 * NW);
    run_w($urandom, $urandom, 10);           // reloaded early
    run_w(32'hA5A5_5A5A, $urandom, 2 * NW);
    run_n('1, 8'h3c, 2 * NN);
    for (int i = 0; i < 20; i++) run_n(8'($urandom), 8'($urandom), 2 * NN);
    run_n(8'($urandom), 8'($urandom), 3);
    run_n(8'h96, 8'($urandom), 2 * NN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
