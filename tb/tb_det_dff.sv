// tb_det_dff: self-checking test of the double-edge D flip-flop register.
// Random data is presented two time units after each edge. q must take d on every rising and
// every falling edge, must hold between edges, and must follow the asynchronous reset.
module tb_det_dff;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] RV = 8'h5A;

  logic clk = 1'b0, rst = 1'b0;
  logic [W-1:0] d = '0, q, d_prev;
  int checks = 0, failures = 0;
  int rise_caps = 0, fall_caps = 0;

  det_dff #(.W(W), .RST_VAL(RV)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

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
    for (int i = 0; i < 400; i++) begin
      d = W'($urandom);
      #1;
      if (i > 0) check(q == d_prev, "holds between edges");
      @(posedge clk or negedge clk);
      #1;
      check(q == d, clk ? "capture on rising edge" : "capture on falling edge");
      if (q == d) begin
        if (clk) rise_caps++; else fall_caps++;
      end
      d_prev = d;
    end
    check(rise_caps > 100 && fall_caps > 100, "both edge polarities captured");
    // asynchronous reset between edges
    #1 rst = 1'b1;
    #1 check(q == RV, "asynchronous reset takes effect immediately");
    @(posedge clk); #1 check(q == RV, "held in reset across rising edge");
    @(negedge clk); #1 check(q == RV, "held in reset across falling edge");
    d = 8'hC3;
    rst = 1'b0;
    @(posedge clk or negedge clk); #1;
    check(q == 8'hC3, "capture after reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
