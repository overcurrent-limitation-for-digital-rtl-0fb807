// tb_ocl_steady_state: steady-state output characteristic of the converter
// with overcurrent limitation, at the default parameters.
//
// For each operating point the controller is reset, the power stage starts
// from 5 V / 0.5 A and the load resistance is applied; after 3 ms the output
// voltage, load current and the controller's load estimate R_o_est =
// E_o_oc / I_o_set are averaged over 1 ms. Expected values:
//   * regulation points (25, 10, 6, 5 ohm, i.e. 0.2 to 1 A): e_o = 5 V within 2 %;
//   * limited points (3, 2, 1 ohm at I_o_set = 1.2 A and 1.4 A): load
//     current within 6 % of I_o_set, output voltage = I_o_set * R_o within
//     8 %, R_o_est within 10 % of R_o.
module tb_ocl_steady_state;
  timeunit 1ns;
  timeprecision 1ps;
  import ocl_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         init = 1'b1;
  real          r_o = 10.0;
  logic [15:0]  i_set_ma = 16'd1200;
  real          i_l, e_o, ac_es;
  logic [13:0]  eo_data;
  logic         eo_valid, s_w, adc_trig, s_d, s_cs;
  ctrl_status_t status;

  int checks = 0, failures = 0;
  real   sum_il, sum_eo, sum_rest;
  longint n_samp, n_per;

  always #0.5 clk = ~clk;

  buck_plant_model u_plant (.s_w, .init, .r_o, .i_l, .e_o, .ac_es);
  adc_model u_adc (.clk, .trig(adc_trig), .e_o, .data(eo_data), .valid(eo_valid));

  ocl_converter_ctrl dut (
    .clk, .rst_n, .ac_es, .eo_data, .eo_valid, .i_set_ma,
    .s_w, .adc_trig, .s_d, .s_cs, .status
  );

  always @(posedge clk) begin
    sum_il += i_l;
    sum_eo += e_o;
    n_samp += 1;
    if (adc_trig) begin
      sum_rest += real'(status.e_oc_q) / 256.0 / GV_PER_V / (real'(i_set_ma) / 1000.0);
      n_per += 1;
    end
  end

  task automatic check_rel(input string what, input real got, input real want, input real rel);
    checks++;
    if (got < want * (1.0 - rel) || got > want * (1.0 + rel)) begin
      failures++;
      $display("FAIL %s: %0.3f, want %0.3f +- %0.0f %%", what, got, want, rel * 100.0);
    end
  endtask

  task automatic point(input real r, input int ima);
    real eo_avg, io_avg, rest_avg;
    rst_n = 1'b0; init = 1'b1;
    r_o = r; i_set_ma = 16'(ima);
    repeat (20) @(posedge clk);
    rst_n = 1'b1; init = 1'b0;
    repeat (3_000_000) @(posedge clk);
    sum_il = 0.0; sum_eo = 0.0; sum_rest = 0.0; n_samp = 0; n_per = 0;
    repeat (1_000_000) @(posedge clk);
    eo_avg = sum_eo / n_samp;
    io_avg = eo_avg / r;
    rest_avg = sum_rest / n_per;
    $display("R_o=%4.1f ohm I_o_set=%0.1f A : E_o=%0.3f V  I_o=%0.3f A  i_L=%0.3f A  S_oc=%0b  R_o_est=%0.2f ohm",
             r, real'(ima) / 1000.0, eo_avg, io_avg, sum_il / n_samp, status.s_oc,
             status.s_oc ? rest_avg : 0.0);
    if (5.0 / r <= 1.0) begin
      check_rel("regulated output voltage", eo_avg, 5.0, 0.02);
    end else begin
      check_rel("limited load current", io_avg, real'(ima) / 1000.0, 0.06);
      check_rel("output voltage E_o_oc", eo_avg, real'(ima) / 1000.0 * r, 0.08);
      check_rel("load estimate R_o_est", rest_avg, r, 0.10);
    end
  endtask

  initial begin
    sum_il = 0.0; sum_eo = 0.0; sum_rest = 0.0; n_samp = 0; n_per = 0;
    point(25.0, 1200);
    point(10.0, 1200);
    point(6.0, 1200);
    point(5.0, 1200);
    point(3.0, 1200);
    point(2.0, 1200);
    point(1.0, 1200);
    point(3.0, 1400);
    point(2.0, 1400);
    point(1.0, 1400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
