// tb_stpc: self-checking test of the serial-to-parallel converter.
// A 64-bit double-edge converter (stepped on every edge) and a 16-bit single-edge converter
// (stepped on rising edges) receive random serial bits with a random shift enable. A reference
// shift register in the testbench must match par_out after every step: with shift_en the word
// moves one place right and takes the new bit at the top, without it the word holds.
module tb_stpc;
  localparam int unsigned WW = 64;
  localparam int unsigned WN = 16;

  logic clk = 1'b0, rst = 1'b0;
  logic en_w = 1'b0, en_n = 1'b0, in_w = 1'b0, in_n = 1'b0;
  logic [WW-1:0] q_w, ref_w;
  logic [WN-1:0] q_n, ref_n;
  int checks = 0, failures = 0, holds = 0;

  stpc #(.W(WW), .DET(1'b1)) dut_w (.clk(clk), .rst(rst), .shift_en(en_w), .ser_in(in_w), .par_out(q_w));
  stpc #(.W(WN), .DET(1'b0)) dut_n (.clk(clk), .rst(rst), .shift_en(en_n), .ser_in(in_n), .par_out(q_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
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
    #1 check(q_w == '0 && q_n == '0, "reset clears");
    ref_w = '0; ref_n = '0;
    @(negedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      en_w = ($urandom % 4) != 0;
      in_w = 1'($urandom);
      if (clk == 1'b0) begin  // the next edge is a rising one: the single-edge one steps too
        en_n = ($urandom % 4) != 0;
        in_n = 1'($urandom);
      end
      @(posedge clk or negedge clk);
      if (en_w) ref_w = {in_w, ref_w[WW-1:1]};
      else      holds++;
      if (clk && en_n) ref_n = {in_n, ref_n[WN-1:1]};
      #1;
      check(q_w == ref_w, "DET converter word");
      check(q_n == ref_n, "SET converter word");
    end
    check(holds > 50, "hold (shift_en low) exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
