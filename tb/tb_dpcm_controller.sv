// tb_dpcm_controller: the digital controller at its default parameters with
// the analog detector replaced by a pulse source: each falling S_D edge
// produces an S_CS pulse of programmable width (standing for the sensed
// current). Per switching period it checks
//   * S_D falls N_Drive cycles after the period start (T_D = N_Drive * 1 ns),
//   * S_w is on from the period start and drops 2 to 3 ns after S_CS falls
//     (two synchronizer stages plus the DPWM register, 1 ns clock),
//   * N_Drive = N_PID while S_CS is longer than T_CS* = 330 ns,
//   * a shorter S_CS sets S_oc, N_oc is computed and matches the
//     steady-state formula, and N_Drive becomes min(N_PID, N_oc),
//   * a longer S_CS again clears S_oc and returns N_Drive to N_PID.
module tb_dpcm_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import ocl_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [13:0]  eo_data = 14'd2500;
  logic         eo_valid = 1'b0;
  logic [15:0]  i_set_ma = 16'd1200;
  logic         s_cs = 1'b0, s_d, s_w, adc_trig;
  ctrl_status_t status;
  int checks = 0, failures = 0;
  int cs_width = 625;
  int n_ocsel = 0, n_reg = 0, n_ocdet = 0;

  always #0.5 clk = ~clk;

  dpcm_controller dut (.clk, .rst_n, .eo_data, .eo_valid, .i_set_ma, .s_cs,
                       .s_d, .s_w, .adc_trig, .status);

  // stand-in for the peak current detector
  always @(negedge s_d) begin
    #1 s_cs = 1'b1;
    #(cs_width) s_cs = 1'b0;
  end

  // A-D converter stand-in: new sample 500 cycles after every trigger
  always @(posedge clk) if (adc_trig) begin
    repeat (500) @(posedge clk);
    @(negedge clk) eo_valid = 1'b1;
    @(negedge clk) eo_valid = 1'b0;
  end

  function automatic int ref_noc(input int e, input int ncs, input int ima);
    real ipk, iset, von, den, eoc;
    iset = real'(ima) / 1000.0;
    ipk  = 34.375 / real'(ncs);
    eoc  = (real'(e) / 500.0) / ipk * iset;
    von  = eoc + 0.25 * iset;
    den  = iset + (15.0 - eoc) / (2.0 * 175.0e-6) * von / 15.0 * 10.0e-6;
    return int'(von / 15.0 * 10000.0 - 343.75 / den);
  endfunction

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // watch one period from its start; returns with the period's values
  task automatic one_period(output int t_sd, output int t_cs_fall, output int t_sw_fall);
    int t;
    logic sd_d, cs_d, sw_d;
    @(posedge clk iff adc_trig);
    t = 0; t_sd = -1; t_cs_fall = -1; t_sw_fall = -1;
    sd_d = 1'b1; cs_d = 1'b0; sw_d = 1'b1;
    #0.1;
    chk("S_w on at period start", s_w);
    while (t < 9990) begin
      @(posedge clk);
      t++;
      #0.1;
      if (!s_d && sd_d && t_sd < 0) t_sd = t;
      if (!s_w && sw_d && t_sw_fall < 0) t_sw_fall = t;
      sd_d = s_d; sw_d = s_w;
    end
  endtask

  always @(negedge s_cs) cs_fall_time = $realtime;
  realtime cs_fall_time, p_start;
  always @(posedge clk) if (adc_trig) p_start = $realtime;

  initial begin
    int t_sd, t_csf, t_swf, nd, expect_drive;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // regulation: long S_CS (about 0.55 A), output at the set point
    eo_data = 14'd2500;
    cs_width = 625;
    one_period(t_sd, t_csf, t_swf);   // first period runs with the reset N_Drive = 0
    repeat (5) begin
      one_period(t_sd, t_csf, t_swf);
      nd = int'(status.n_drive);
      chk("S_D falls after T_D = N_Drive", t_sd == nd + 1 || t_sd == nd);
      chk("S_w drops 2 to 3 ns after S_CS", (p_start + real'(t_swf) - cs_fall_time) >= 2.0 &&
                                            (p_start + real'(t_swf) - cs_fall_time) <= 3.0);
      chk("regulation: N_Drive = N_PID", !status.s_oc && status.n_drive == status.n_pid);
      if (!status.s_oc) n_reg++;
    end
    chk("N_PID at set point equals N_B", status.n_pid == 14'd2950);

    // overload: S_CS of 290 ns (1.2 A), output sagging to 3.6 V
    eo_data = 14'd1800;
    cs_width = 290;
    repeat (6) begin
      one_period(t_sd, t_csf, t_swf);
      if (status.s_oc) n_ocdet++;
      if (status.oc_selected) n_ocsel++;
    end
    chk("overcurrent detected", status.s_oc);
    $display("     N_CS=%0d N_oc=%0d (ref %0d) N_PID=%0d N_Drive=%0d", status.n_cs,
             status.n_oc, ref_noc(1800, int'(status.n_cs), 1200), status.n_pid, status.n_drive);
    chk("N_CS = 29", status.n_cs == 12'd29);
    chk("N_oc matches the steady-state formula",
        int'(status.n_oc) inside {[ref_noc(1800, 29, 1200) - 3 : ref_noc(1800, 29, 1200) + 3]});
    one_period(t_sd, t_csf, t_swf);
    expect_drive = (status.n_oc < status.n_pid) ? int'(status.n_oc) : int'(status.n_pid);
    chk("overcurrent mode: N_Drive = min(N_PID, N_oc)", int'(status.n_drive) == expect_drive);
    chk("N_oc selected", status.oc_selected);

    // higher limit gives a larger N_oc
    i_set_ma = 16'd1400;
    repeat (2) one_period(t_sd, t_csf, t_swf);
    chk("N_oc follows I_o_set",
        int'(status.n_oc) inside {[ref_noc(1800, 29, 1400) - 3 : ref_noc(1800, 29, 1400) + 3]});

    // load relieved: long S_CS clears the overcurrent signal
    cs_width = 500;
    eo_data = 14'd2500;
    repeat (3) one_period(t_sd, t_csf, t_swf);
    chk("back in regulation", !status.s_oc && status.n_drive == status.n_pid);

    chk("mechanism: regulation periods", n_reg > 0);
    chk("mechanism: overcurrent periods", n_ocdet > 0);
    chk("mechanism: N_oc selected", n_ocsel > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
