// tb_dpwm: S_w must rise one cycle after the period start, fall one cycle
// after S_CS falls, ignore the rising edge of S_CS, and fall at the end of a
// period that had no S_CS pulse. A software period counter (100 cycles)
// stands in for the delay circuit.
module tb_dpwm;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  logic period_start = 1'b0, period_last = 1'b0, s_cs = 1'b0, s_w;
  int checks = 0, failures = 0;
  int cyc;
  int on_at, off_at, cs_rise, cs_fall;

  always #5 clk = ~clk;

  dpwm dut (.clk, .rst_n, .period_start, .period_last, .s_cs, .s_w);

  task automatic check(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // one 100-cycle period; S_CS high in [cs_rise, cs_fall) (none if cs_rise < 0)
  task automatic period(input int rise, input int fall);
    for (cyc = 0; cyc < 100; cyc++) begin
      @(negedge clk);
      period_start = (cyc == 0);
      period_last  = (cyc == 99);
      s_cs = (rise >= 0) && cyc >= rise && cyc < fall;
      @(posedge clk);
      #1;
      if (cyc == 0) check("S_w on after period start", s_w);
      else if (rise >= 0 && cyc < fall) check("S_w stays on before S_CS falls", s_w);
      else if (rise >= 0 && cyc >= fall) check("S_w off after S_CS falls", !s_w);
      else if (cyc < 99) check("S_w stays on without S_CS", s_w);
      else check("S_w off at period end", !s_w);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("S_w low after reset", !s_w);
    period(30, 40);
    period(10, 70);
    period(-1, 0);
    period(50, 51);
    period(5, 99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
