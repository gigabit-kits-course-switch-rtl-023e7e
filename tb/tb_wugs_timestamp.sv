// tb_wugs_timestamp: checks that the time advances by two half steps per
// cell time, that stamps equal the time when idle, and that after a change
// at tau the stamps follow tau + T + (now - tau)/2 for 2T cell times,
// never decrease, never repeat, and then return to the plain time.
module tb_wugs_timestamp;
  import wugs_pkg::*;
  logic clk = 0, rst = 1;
  logic change, enable;
  logic [11:0] t_param;
  logic [TS_W-1:0] now, stamp;
  logic transitional;
  int checks = 0, failures = 0;

  wugs_timestamp dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s now=%0d stamp=%0d", msg, now, stamp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [TS_W-1:0] prev_now, tau, prev_stamp;
    int T;
    int trans_cycles;
    change = 0; enable = 1; t_param = 12'd20; T = 20;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    prev_now = now;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      check(now == prev_now + 2, "time step");
      check(stamp == now && !transitional, "idle stamp");
      prev_now = now;
    end
    // route change
    change = 1; tau = now;
    @(negedge clk);
    change = 0;
    trans_cycles = 0;
    prev_stamp = '0;
    for (int i = 1; i < 3 * T; i++) begin
      int el;
      el = int'(now - tau);
      if (el < 4 * T) begin
        check(transitional, "transitional active");
        check(stamp == tau + TS_W'(2 * T) + TS_W'(el / 2), "inflated stamp");
        if (i > 1) check(stamp > prev_stamp, "stamps strictly increase");
        trans_cycles++;
      end else begin
        check(!transitional && stamp == now, "back to plain stamp");
      end
      prev_stamp = stamp;
      @(negedge clk);
    end
    check(trans_cycles == 2 * T - 1, "transition lasts 2T cell times");
    // disabled: no inflation
    enable = 0; change = 1;
    @(negedge clk);
    change = 0;
    @(negedge clk);
    check(!transitional && stamp == now, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
