// tb_pid_controller: checks N_PID against the PID law evaluated in real
// arithmetic (gains 5, 0.06, 1; bias 2950; set point 2500) for a random
// sequence of samples, the one-cycle latency of `valid`, and the clamping
// of the result to 0..N_MAX.
module tb_pid_controller;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0, calc = 1'b0, valid;
  logic [13:0] e_o = 14'd2500;
  logic [13:0] n_pid;
  int checks = 0, failures = 0;
  real sum, ref_n, eprev;
  int  e, expect_n;

  always #5 clk = ~clk;

  pid_controller dut (.clk, .rst_n, .calc, .e_o, .n_pid, .valid);

  task automatic step(input int sample);
    @(negedge clk);
    e_o  = 14'(sample);
    calc = 1'b1;
    @(negedge clk);
    calc = 1'b0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid not one cycle after calc"); end
    sum   = sum + real'(sample - 2500);
    ref_n = 2950.0 - 5.0 * real'(sample - 2500) - 0.06 * sum - 1.0 * (real'(sample) - eprev);
    eprev = real'(sample);
    if (ref_n < 0.0) expect_n = 0;
    else if (ref_n > 9999.0) expect_n = 9999;
    else expect_n = int'(ref_n);
    checks++;
    if (int'(n_pid) < expect_n - 2 || int'(n_pid) > expect_n + 2) begin
      failures++;
      $display("FAIL e=%0d n_pid=%0d expect %0d (%0.2f)", sample, n_pid, expect_n, ref_n);
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid longer than one cycle"); end
  endtask

  initial begin
    sum = 0.0; eprev = 2500.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (n_pid != 14'd2950) begin failures++; $display("FAIL reset value %0d", n_pid); end
    step(2500);
    step(2510);
    step(2490);
    step(2400);
    for (int i = 0; i < 200; i++) begin
      e = 2300 + int'($urandom_range(0, 400));
      step(e);
    end
    // large negative error drives N_PID to its upper clamp
    for (int i = 0; i < 5; i++) step(500);
    // large positive error drives it to zero
    for (int i = 0; i < 40; i++) step(8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
