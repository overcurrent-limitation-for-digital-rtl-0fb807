// tb_ocl_unlimited_step: the 10 ohm -> 3 ohm load step with the limit set so
// high (I_o_set = 10 A) that N_oc never wins the comparison in the MUX, so
// the converter behaves as a plain peak-current-mode regulator. It is the
// comparison case for the limited load steps of tb_ocl_converter_ctrl.
//
// Expected behaviour, worked out from the circuit values: the output voltage
// returns to 5 V, the load current settles at 5 V / 3 ohm = 1.67 A, and the
// inductor current overshoots that final value during the recovery. Checks:
// N_oc never selected, overcurrent still detected (T_CS < T_CS* at 1.67 A),
// final e_o = 5 V within 2 %, final i_L = 1.67 A within 5 %, peak i_L at
// least 0.3 A above the final load current and above both limit settings
// (1.2 A and 1.4 A).
module tb_ocl_unlimited_step;
  timeunit 1ns;
  timeprecision 1ps;
  import ocl_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         init = 1'b1;
  real          r_o = 10.0;
  logic [15:0]  i_set_ma = 16'd10000;
  real          i_l, e_o, ac_es;
  logic [13:0]  eo_data;
  logic         eo_valid, s_w, adc_trig, s_d, s_cs;
  ctrl_status_t status;

  int checks = 0, failures = 0;
  int n_oc_det = 0, n_oc_sel = 0;
  real il_peak = 0.0, sum_il, sum_eo;
  longint n_samp;

  always #0.5 clk = ~clk;

  buck_plant_model u_plant (.s_w, .init, .r_o, .i_l, .e_o, .ac_es);
  adc_model u_adc (.clk, .trig(adc_trig), .e_o, .data(eo_data), .valid(eo_valid));

  ocl_converter_ctrl dut (
    .clk, .rst_n, .ac_es, .eo_data, .eo_valid, .i_set_ma,
    .s_w, .adc_trig, .s_d, .s_cs, .status
  );

  always @(posedge clk) begin
    if (rst_n) begin
      if (i_l > il_peak) il_peak = i_l;
      if (adc_trig && status.s_oc)        n_oc_det++;
      if (adc_trig && status.oc_selected) n_oc_sel++;
    end
    sum_il += i_l;
    sum_eo += e_o;
    n_samp += 1;
  end

  task automatic check_range(input string what, input real got, input real lo, input real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %0.3f, want %0.3f .. %0.3f", what, got, lo, hi);
    end
  endtask

  initial begin
    real eo_avg, il_avg;
    sum_il = 0.0; sum_eo = 0.0; n_samp = 0;
    repeat (20) @(posedge clk);
    rst_n = 1'b1; init = 1'b0;
    repeat (3_000_000) @(posedge clk);          // settle at 10 ohm
    $display("before step: e_o=%0.3f V i_L=%0.3f A N_Drive=%0d", e_o, i_l, status.n_drive);
    checks++;
    if (n_oc_det != 0) begin
      failures++;
      $display("FAIL overcurrent detected at 10 ohm");
    end
    il_peak = 0.0;
    r_o = 3.0;
    repeat (9_000_000) @(posedge clk);
    sum_il = 0.0; sum_eo = 0.0; n_samp = 0;
    repeat (1_000_000) @(posedge clk);
    eo_avg = sum_eo / n_samp;
    il_avg = sum_il / n_samp;
    $display("after step: e_o=%0.3f V i_L=%0.3f A, peak i_L=%0.3f A, N_Drive=%0d",
             eo_avg, il_avg, il_peak, status.n_drive);
    $display("periods with S_oc: %0d, with N_oc selected: %0d; N_PID=%0d N_oc=%0d",
             n_oc_det, n_oc_sel, status.n_pid, status.n_oc);
    check_range("regulated e_o after the step", eo_avg, 4.9, 5.1);
    check_range("load current after the step", il_avg, 5.0 / 3.0 * 0.95, 5.0 / 3.0 * 1.05);
    check_range("peak i_L overshoot", il_peak, 5.0 / 3.0 + 0.3, 10.0);
    checks++;
    if (n_oc_det == 0) begin
      failures++;
      $display("FAIL overcurrent never detected after the step");
    end
    checks++;
    if (n_oc_sel != 0) begin
      failures++;
      $display("FAIL N_oc selected with I_o_set = 10 A");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
