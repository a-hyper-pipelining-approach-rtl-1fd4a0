// tb_pipe_mem_sep: self-checking test of the separate pipe memory.
// Two instances are tested side by side: one single-edge (DET = 0) and one double-edge
// (DET = 1). Random sum and carry bits are presented between edges. A reference copy in the
// testbench is updated on rising edges for the single-edge instance and on both edges for the
// double-edge one, and both instances must match it after every edge. The two stored bits
// must stay independent: sum must never appear on carry or the other way round.
module tb_pipe_mem_sep;
  logic clk = 1'b0, rst = 1'b0;
  logic sum_d = 1'b0, carry_d = 1'b0;
  logic s_set, c_set, s_det, c_det;
  logic ref_s_set, ref_c_set, ref_s_det, ref_c_det;
  int checks = 0, failures = 0;

  pipe_mem_sep #(.DET(1'b0)) dut_set (
    .clk(clk), .rst(rst), .sum_d(sum_d), .carry_d(carry_d), .sum_q(s_set), .carry_q(c_set)
  );
  pipe_mem_sep #(.DET(1'b1)) dut_det (
    .clk(clk), .rst(rst), .sum_d(sum_d), .carry_d(carry_d), .sum_q(s_det), .carry_q(c_det)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1;
    check({s_set, c_set, s_det, c_det} == 4'b0000, "reset clears both memories");
    ref_s_set = 1'b0; ref_c_set = 1'b0; ref_s_det = 1'b0; ref_c_det = 1'b0;
    @(negedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      // sum and carry patterns differ so that a swapped or shared bit is caught
      sum_d   = 1'($urandom);
      carry_d = (i % 3 == 0) ? ~sum_d : 1'($urandom);
      @(posedge clk or negedge clk);
      if (clk) begin
        ref_s_set = sum_d;
        ref_c_set = carry_d;
      end
      ref_s_det = sum_d;
      ref_c_det = carry_d;
      #1;
      check(s_set == ref_s_set, "single-edge sum");
      check(c_set == ref_c_set, "single-edge carry");
      check(s_det == ref_s_det, "double-edge sum");
      check(c_det == ref_c_det, "double-edge carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
