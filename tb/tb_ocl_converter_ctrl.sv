// tb_ocl_converter_ctrl: closed-loop test of the converter control with the
// overcurrent limiter, at the design's default parameters.
//
// The controller and detector drive a behavioural buck power stage (15 V in,
// 5 V out, L = 175 uH, C_o = 285 uF) and a 14-bit A-D converter model. The
// load sequence reproduces the reference transient tests:
//   A  R_o = 10 ohm, I_o_set = 1.2 A : regulation mode, e_o ~ 5 V
//   B  R_o steps to 3 ohm            : overcurrent detected, N_oc takes over,
//                                      load current held near 1.2 A, no
//                                      inductor-current overshoot
//   C  I_o_set changed to 1.4 A      : load current follows the new limit
//   D  R_o back to 10 ohm            : the detector clears S_oc again and,
//                                      once the PID error sum has unwound,
//                                      e_o returns to 5 V
// Checks use averages over the last part of each phase; expected values come
// from circuit arithmetic (e.g. 1.2 A * 3 ohm = 3.6 V), not from the RTL.
// During the transient, the first load estimate must exceed the final 3 ohm
// (the peak current lags the voltage sag) and N_PID must keep rising while N_oc
// is in use (the voltage loop still sees the sagging output).
// Each mechanism (regulation period, overcurrent detection, N_oc calculation,
// N_oc selected by the MUX, return to regulation) is counted and must occur.
module tb_ocl_converter_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import ocl_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  real          r_o = 10.0;
  logic [15:0]  i_set_ma = 16'd1200;
  real          i_l, e_o, ac_es;
  logic [13:0]  eo_data;
  logic         eo_valid, s_w, adc_trig, s_d, s_cs;
  ctrl_status_t status;

  int checks = 0, failures = 0;
  int n_reg = 0, n_ocdet = 0, n_noc = 0, n_ocsel = 0, n_back = 0;

  always #0.5 clk = ~clk;

  buck_plant_model u_plant (.s_w, .init(1'b0), .r_o, .i_l, .e_o, .ac_es);
  adc_model u_adc (.clk, .trig(adc_trig), .e_o, .data(eo_data), .valid(eo_valid));

  ocl_converter_ctrl dut (
    .clk, .rst_n, .ac_es, .eo_data, .eo_valid, .i_set_ma,
    .s_w, .adc_trig, .s_d, .s_cs, .status
  );

  // statistics over a window
  real   sum_il, sum_eo, max_il;
  longint n_samp;
  logic  s_oc_d = 1'b0;
  real   first_rest = -1.0;    // first load estimate after the overcurrent is detected
  int    npid_at_b = 0;

  always @(posedge clk) begin
    sum_il += i_l;
    sum_eo += e_o;
    n_samp += 1;
    if (i_l > max_il) max_il = i_l;
    s_oc_d <= status.s_oc && rst_n;
    if (rst_n && status.s_oc && !s_oc_d) n_ocdet++;
    if (rst_n && !status.s_oc && s_oc_d) n_back++;
    if (rst_n && dut.u_ctrl.noc_done) begin
      n_noc++;
      if (first_rest < 0.0)
        first_rest = real'(status.e_oc_q) / 256.0 / GV_PER_V / (real'(i_set_ma) / 1000.0);
    end
    if (rst_n && adc_trig) begin
      if (status.oc_selected) n_ocsel++;
      else if (!status.s_oc) n_reg++;
    end
  end

  task automatic clear_stats();
    sum_il = 0.0; sum_eo = 0.0; max_il = 0.0; n_samp = 0;
  endtask

  task automatic run_us(input int us);
    repeat (us * 1000) @(posedge clk);
  endtask

  task automatic check_near(input string what, input real got, input real want,
                            input real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: got %0.3f want %0.3f +- %0.3f", what, got, want, tol);
    end else
      $display("ok   %s: %0.3f (want %0.3f)", what, got, want);
  endtask

  task automatic check_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end else
      $display("ok   %s", what);
  endtask

  initial begin
    clear_stats();
    repeat (20) @(posedge clk);
    rst_n = 1'b1;

    // ---- A: regulation at 10 ohm
    run_us(2000);
    clear_stats();
    run_us(1000);
    check_near("A regulated e_o [V]", sum_eo / n_samp, 5.0, 0.1);
    check_near("A load current [A]", sum_il / n_samp, 0.5, 0.05);
    check_true("A stays in regulation mode", n_ocdet == 0);
    $display("     N_Drive in regulation = %0d", status.n_drive);
    check_near("A N_Drive (T_D in ns)", real'(status.n_drive), 2750.0, 250.0);

    // ---- B: load step 10 -> 3 ohm, I_o_set = 1.2 A
    clear_stats();
    r_o = 3.0;
    run_us(500);
    check_true("B overcurrent detected", status.s_oc);
    check_true("B inductor peak without overshoot", max_il < 1.2 * 1.25);
    $display("     max i_L after step = %0.3f A", max_il);
    npid_at_b = int'(status.n_pid);
    $display("     first R_o_est after detection = %0.2f ohm", first_rest);
    check_true("B first load estimate above R_o (peak > load current early on)", first_rest > 3.0);
    run_us(1500);
    check_true("B N_PID keeps rising while N_oc limits", int'(status.n_pid) > npid_at_b);
    clear_stats();
    run_us(1000);
    check_near("B limited current [A]", sum_il / n_samp, 1.2, 0.12);
    check_near("B output voltage E_o_oc [V]", sum_eo / n_samp, 3.6, 0.4);
    check_true("B N_oc drives the converter", status.oc_selected);
    $display("     N_PID=%0d N_oc=%0d N_CS=%0d R_o_est=%0.2f", status.n_pid,
             status.n_oc, status.n_cs,
             (real'(status.e_oc_q) / 256.0 / GV_PER_V) / 1.2);

    // ---- C: I_o_set = 1.4 A
    i_set_ma = 16'd1400;
    run_us(2000);
    clear_stats();
    run_us(1000);
    check_near("C limited current [A]", sum_il / n_samp, 1.4, 0.14);
    check_near("C output voltage E_o_oc [V]", sum_eo / n_samp, 4.2, 0.45);

    // ---- D: back to 10 ohm
    r_o = 10.0;
    run_us(8000);
    clear_stats();
    run_us(1000);
    check_true("D overcurrent signal cleared at least once", n_back > 0);
    check_near("D output back at the set point [V]", sum_eo / n_samp, 5.0, 0.1);
    check_true("D regulation mode again", !status.s_oc);

    check_true("mechanism: regulation periods", n_reg > 0);
    check_true("mechanism: overcurrent detections", n_ocdet > 0);
    check_true("mechanism: N_oc calculations", n_noc > 0);
    check_true("mechanism: N_oc selected periods", n_ocsel > 0);
    $display("counts: regulation=%0d oc_detect=%0d noc_calc=%0d oc_selected=%0d back=%0d",
             n_reg, n_ocdet, n_noc, n_ocsel, n_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(30_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
