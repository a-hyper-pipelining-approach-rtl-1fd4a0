// tb_micro_pipeline: self-checking test of the serial-parallel micro-pipeline.
// Two 32-bit pipelines are tested: the main double-edge combined-memory one, stepped on every
// clock edge, and a single-edge separate-memory one, stepped on rising edges. For each operation
// the testbench holds b, feeds a LSB first followed by 32 zeros, collects the 64 serial product
// bits and compares them with a * b computed by the testbench. Operations follow each other
// with no reset in between, which checks that the zero bits flush the accumulator. The number of
// clock periods per product is checked: 64 in the single-edge pipeline, 32 in the double-edge one.
module tb_micro_pipeline;
  import hm_pkg::*;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst = 1'b0;
  logic a_det = 1'b0, a_set = 1'b0;
  logic [N-1:0] b_det = '0, b_set = '0;
  logic p_det, p_set;
  int checks = 0, failures = 0;

  micro_pipeline #(.N(N), .MEM(MEM_DET_COMB)) dut_det (
    .clk(clk), .rst(rst), .a_ser(a_det), .b(b_det), .p_ser(p_det)
  );
  micro_pipeline #(.N(N), .MEM(MEM_SET_SEP)) dut_set (
    .clk(clk), .rst(rst), .a_ser(a_set), .b(b_set), .p_ser(p_set)
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

  // One multiplication through one of the two pipelines; det selects which.
  task automatic multiply(input bit det, input logic [N-1:0] a, input logic [N-1:0] b);
    logic [2*N-1:0] got, expect_p;
    int unsigned r0;
    expect_p = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    r0 = rises;
    for (int t = 0; t < 2 * N; t++) begin
      if (det) begin
        b_det = b;
        a_det = (t < N) ? a[t] : 1'b0;
        @(posedge clk or negedge clk); #1;
        got[t] = p_det;
      end else begin
        b_set = b;
        a_set = (t < N) ? a[t] : 1'b0;
        @(posedge clk); #1;
        got[t] = p_set;
      end
    end
    check(got == expect_p, $sformatf("%s product %h * %h = %h, got %h",
                                     det ? "DET" : "SET", a, b, expect_p, got));
    check((rises - r0) == (det ? N : 2 * N), $sformatf("%s clock periods per product: %0d",
                                     det ? "DET" : "SET", rises - r0));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1 check(p_det == 1'b0 && p_set == 1'b0, "reset clears the pipelines");
    @(negedge clk); #1 rst = 1'b0;
    for (int d = 1; d >= 0; d--) begin
      // wait for an edge of the right kind before starting
      @(posedge clk); #1;
      multiply(d[0], '1, '1);
      multiply(d[0], '0, 32'h1234_5678);
      multiply(d[0], 32'h1, 32'hdead_beef);
      multiply(d[0], 32'h8000_0000, 32'h8000_0001);
      for (int i = 0; i < 40; i++) multiply(d[0], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
