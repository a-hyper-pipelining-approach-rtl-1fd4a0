// tb_set_dff: self-checking test of the single-edge D flip-flop register.
// Random data is presented between edges. q must take d on every rising edge, must not move on
// falling edges, must go to RST_VAL at once when the asynchronous reset rises, and must stay
// there while reset is high.
module tb_set_dff;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] RV = 8'hA5;

  logic clk = 1'b0, rst = 1'b0;
  logic [W-1:0] d = '0, q, q_before;
  int checks = 0, failures = 0;

  set_dff #(.W(W), .RST_VAL(RV)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (q=%h d=%h)", what, q, d);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1 check(q == RV, "reset value");
    @(negedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      @(posedge clk); #1;
      check(q == d, "capture on rising edge");
      q_before = q;
      d = ~d;
      @(negedge clk); #1;
      check(q == q_before, "no capture on falling edge");
    end
    // asynchronous reset between edges
    d = 8'h3C;
    @(posedge clk); #1;
    check(q == 8'h3C, "capture before reset");
    #1 rst = 1'b1;
    #1 check(q == RV, "asynchronous reset takes effect immediately");
    @(posedge clk); #1;
    check(q == RV, "held in reset across an edge");
    rst = 1'b0;
    @(posedge clk); #1;
    check(q == 8'h3C, "capture after reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
