// tb_stream_ctrl: self-checking test of the start/timing state machine.
//
// A start request must give exactly one kernel_go pulse in the next cycle,
// busy until the application reports done, a finished flag afterwards and a
// cycle count from the go cycle to the done cycle. A start request while
// busy must be ignored, and a second run must restart the count.
module tb_stream_ctrl;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, app_done = 1'b1;
  logic        kernel_go, busy, finished;
  logic [31:0] cycles;
  int          checks = 0, failures = 0, gos = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && kernel_go) gos++;

  stream_ctrl dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int len);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(kernel_go && busy, "kernel_go with busy in the cycle after start");
    app_done = 1'b0;
    @(negedge clk);
    check(!kernel_go && busy && !finished, "one go pulse, busy, not finished");
    repeat (len - 2) begin
      start = 1'b1;       // ignored while busy
      @(negedge clk);
    end
    start = 1'b0;
    app_done = 1'b1;
    @(negedge clk);
    check(!busy && finished, "idle and finished after done");
    check(cycles == 32'(len), $sformatf("cycles=%0d expected %0d", cycles, len));
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !finished && !kernel_go, "idle after reset");
    run(10);
    check(gos == 1, $sformatf("%0d go pulses in run 1", gos));
    run(25);
    check(gos == 2, $sformatf("%0d go pulses after run 2", gos));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
