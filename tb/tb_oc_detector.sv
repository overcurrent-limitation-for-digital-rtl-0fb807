// tb_oc_detector: S_CS pulses of chosen width (in 1 ns timebase cycles) are
// applied. Expected values: N_CS = floor(width/10) (T_clk = 10 cycles),
// S_CS* high for 330 cycles from the S_CS rising edge, S_oc = width < 330
// (T_CS < T_CS*), updated at each S_CS falling edge and held otherwise.
module tb_oc_detector;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0, s_cs = 1'b0;
  logic        s_cs_star, ncs_valid, s_oc;
  logic [11:0] n_cs;
  int checks = 0, failures = 0;
  int star_w, valid_cnt;

  always #0.5 clk = ~clk;

  oc_detector dut (.clk, .rst_n, .s_cs, .s_cs_star, .n_cs, .ncs_valid, .s_oc);

  always @(posedge clk) if (ncs_valid) valid_cnt++;

  task automatic pulse(input int width);
    int vc0;
    vc0 = valid_cnt;
    // S_CS* is sampled in every cycle, starting with the one in which S_CS rises
    @(negedge clk);
    s_cs = 1'b1;
    star_w = 0;
    for (int c = 0; c < width + 400; c++) begin
      if (c == width) s_cs = 1'b0;
      #0.1;
      if (s_cs_star) star_w++;
      @(negedge clk);
    end
    checks++;
    if (int'(n_cs) != width / 10) begin
      failures++; $display("FAIL width %0d: N_CS %0d expect %0d", width, n_cs, width / 10);
    end
    checks++;
    if (s_oc != (width < 330)) begin
      failures++; $display("FAIL width %0d: S_oc %0b", width, s_oc);
    end
    checks++;
    if (star_w != 330) begin
      failures++; $display("FAIL width %0d: S_CS* width %0d", width, star_w);
    end
    checks++;
    if (valid_cnt != vc0 + 1) begin
      failures++; $display("FAIL width %0d: %0d N_CS strobes", width, valid_cnt - vc0);
    end
  endtask

  initial begin
    valid_cnt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (s_oc || s_cs_star) begin failures++; $display("FAIL reset state"); end
    pulse(625);   // 0.55 A: regulation
    pulse(400);
    pulse(329);   // just above I_M
    pulse(330);   // exactly T_CS*: not an overcurrent
    pulse(331);
    pulse(290);   // 1.2 A
    pulse(250);   // 1.4 A
    pulse(500);   // load relieved
    pulse(9);
    for (int i = 0; i < 30; i++) pulse($urandom_range(100, 900));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
