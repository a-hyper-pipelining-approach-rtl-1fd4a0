// tb_pipe: self-checking test of one multiplier pipe in all four storage styles.
// Four pipes (SET/DET x separate/combined memory) get the same random a_ser, b_bit and sum_in
// bits, changed between edges. A reference full adder with its own sum and carry state runs in
// the testbench: on rising edges for the single-edge pipes, on both edges for the double-edge
// pipes. After every edge each pipe's stored sum and carry must match the reference. The test
// also counts the carry loop (a stored carry of 1 feeding the next step) so that the Cout->Cin
// path is known to have been used.
module tb_pipe;
  import hm_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  logic a_ser = 1'b0, b_bit = 1'b0, sum_in = 1'b0;
  logic [3:0] s_q, c_q;
  logic [3:0] ref_s, ref_c;
  int checks = 0, failures = 0, carry_loops = 0;

  localparam mem_style_e STYLES[4] = '{MEM_SET_SEP, MEM_SET_COMB, MEM_DET_SEP, MEM_DET_COMB};

  for (genvar k = 0; k < 4; k++) begin : g_dut
    pipe #(.MEM(STYLES[k])) dut (
      .clk(clk), .rst(rst), .a_ser(a_ser), .b_bit(b_bit), .sum_in(sum_in),
      .sum_q(s_q[k]), .carry_q(c_q[k])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    #1 rst = 1'b1;
    #1;
    check(s_q == 4'b0 && c_q == 4'b0, "reset clears sum and carry");
    ref_s = '0; ref_c = '0;
    @(negedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      a_ser  = 1'($urandom);
      b_bit  = 1'($urandom);
      sum_in = 1'($urandom);
      @(posedge clk or negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (mem_is_det(STYLES[k]) || clk) begin
          if (ref_c[k]) carry_loops++;
          tot = ((a_ser && b_bit) ? 1 : 0) + (sum_in ? 1 : 0) + (ref_c[k] ? 1 : 0);
          ref_s[k] = tot[0];
          ref_c[k] = tot[1];
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        check(s_q[k] == ref_s[k], $sformatf("sum of pipe style %0d", k));
        check(c_q[k] == ref_c[k], $sformatf("carry of pipe style %0d", k));
      end
    end
    check(carry_loops > 100, "carry feedback loop exercised");
    $display("carry loop uses: %0d", carry_loops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
