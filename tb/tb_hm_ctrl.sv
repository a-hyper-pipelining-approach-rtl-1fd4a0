// tb_hm_ctrl: self-checking test of the one-hot sequencer.
// A 32-bit double-edge sequencer (stepped on every edge) and a 4-bit single-edge sequencer
// (stepped on rising edges) are run through whole operations. For each one the test checks:
// load is high only on the step that accepts start; shift_en is low on the first RUN step and
// then high for exactly 2N steps; busy covers the operation; done rises exactly 2N+2 steps
// after the step that sampled start and stays high. It also checks that start is ignored while
// busy, that start is accepted straight from DONE, and that reset returns to idle mid-operation.
module tb_hm_ctrl;
  logic clk = 1'b0, rst = 1'b0;
  logic start_w = 1'b0, start_n = 1'b0;
  logic load_w, sh_w, busy_w, done_w;
  logic load_n, sh_n, busy_n, done_n;
  int checks = 0, failures = 0;

  hm_ctrl #(.N(32), .DET(1'b1)) dut_w (
    .clk(clk), .rst(rst), .start(start_w), .load(load_w), .shift_en(sh_w), .busy(busy_w), .done(done_w)
  );
  hm_ctrl #(.N(4), .DET(1'b0)) dut_n (
    .clk(clk), .rst(rst), .start(start_n), .load(load_n), .shift_en(sh_n), .busy(busy_n), .done(done_n)
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

  // One operation on the sequencer selected by det (1: 32-bit DET, 0: 4-bit SET).
  // poke_busy pulses start in the middle of the operation, which must be ignored.
  task automatic operate(input bit det, input bit poke_busy);
    int n, steps, shifts;
    bit first_run_shift, load_seen_busy;
    n = det ? 32 : 4;
    steps = 1; shifts = 0; load_seen_busy = 0;
    if (det) start_w = 1'b1; else start_n = 1'b1;
    #0 check(det ? load_w : load_n, "load accompanies accepted start");
    step(det);
    if (det) start_w = 1'b0; else start_n = 1'b0;
    first_run_shift = det ? sh_w : sh_n;
    check(!first_run_shift, "no shift on first RUN step");
    while (!(det ? done_w : done_n) && steps < 4 * n + 10) begin
      check(det ? busy_w : busy_n, "busy while running");
      if (det ? sh_w : sh_n) shifts++;
      if (poke_busy && steps == n) begin
        if (det) start_w = 1'b1; else start_n = 1'b1;
        #0 if (det ? load_w : load_n) load_seen_busy = 1;
      end
      step(det);
      if (det) start_w = 1'b0; else start_n = 1'b0;
      steps++;
    end
    check(steps == 2 * n + 2, $sformatf("done after %0d steps, expected %0d", steps, 2 * n + 2));
    check(shifts == 2 * n, $sformatf("%0d STPC shifts, expected %0d", shifts, 2 * n));
    check(!load_seen_busy, "start ignored while busy");
    check(!(det ? busy_w : busy_n), "not busy when done");
    step(det); step(det);
    check(det ? done_w : done_n, "done holds");
    check(!(det ? load_w : load_n) && !(det ? sh_w : sh_n), "no load or shift while done");
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
    #1 check(!busy_w && !done_w && !busy_n && !done_n, "reset to idle");
    @(negedge clk); #1 rst = 1'b0;
    step(1'b0); step(1'b0);
    check(!load_w && !sh_w && !busy_w && !done_w, "DET idle is quiet");
    check(!load_n && !sh_n && !busy_n && !done_n, "SET idle is quiet");
    operate(1'b1, 1'b0);
    operate(1'b1, 1'b1);   // from DONE, with a start poke while busy
    operate(1'b1, 1'b0);
    operate(1'b0, 1'b0);
    operate(1'b0, 1'b1);
    // reset in the middle of an operation
    start_w = 1'b1; step(1'b1); start_w = 1'b0;
    repeat (10) step(1'b1);
    check(busy_w, "busy before reset");
    rst = 1'b1; #1;
    check(!busy_w && !done_w, "reset aborts operation");
    rst = 1'b0;
    step(1'b1);
    check(!busy_w && !done_w, "idle after reset");
    operate(1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
