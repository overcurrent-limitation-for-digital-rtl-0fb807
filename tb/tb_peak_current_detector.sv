// tb_peak_current_detector: for a constant sensed current i the RC
// integrator reaches V_th after T_CS = -tau*ln(1 - V_th/(A_c*R_s*i)); the
// S_CS pulse started by a low S_D must last that long (within 2 ns) and
// stay low until the next S_D. For i below V_th/(A_c*R_s) the pulse never
// ends; that case is not applied.
module tb_peak_current_detector;
  timeunit 1ns;
  timeprecision 1ps;

  real  ac_es = 0.0;
  logic s_d = 1'b1, s_cs;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;

  peak_current_detector dut (.ac_es, .s_d, .s_cs);

  always @(posedge s_cs) t_rise = $realtime;

  task automatic sense(input real i_amp);
    real want;
    ac_es = 128.0 * 0.05 * i_amp;
    #100;
    checks++;
    if (s_cs) begin failures++; $display("FAIL S_CS high before S_D"); end
    s_d = 1'b0;
    #10 s_d = 1'b1;
    wait (!s_cs);
    t_fall = $realtime;
    want = -2.75e3 * $ln(1.0 - 0.8 / ac_es);   // ns
    checks++;
    if (t_fall - t_rise < want - 2.0 || t_fall - t_rise > want + 2.0) begin
      failures++;
      $display("FAIL i=%0.2f A: T_CS %0.1f ns want %0.1f", i_amp, t_fall - t_rise, want);
    end else
      $display("ok   i=%0.2f A: T_CS %0.1f ns (Eq. 5 approximation %0.1f)", i_amp,
               t_fall - t_rise, 343.75 / i_amp);
    #2000;
    checks++;
    if (s_cs) begin failures++; $display("FAIL S_CS restarted without S_D"); end
  endtask

  initial begin
    #50;
    sense(0.5);
    sense(1.0);
    sense(1.2);
    sense(1.4);
    sense(2.7);
    sense(0.3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
