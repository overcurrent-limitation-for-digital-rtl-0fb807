// dpcm_controller: digital peak-current-mode controller of a buck converter
// with overcurrent limitation (the FPGA part of the control loop).
//
// Regulation mode: once per switching period the PID controller turns the
// output-voltage sample e_o into N_PID; the delay circuit waits
// T_D = N_Drive/N_TS*Ts after the period start and then pulses S_D low,
// which starts current sensing in the analog peak current detector. The
// detector returns S_CS, whose end marks the inductor-current peak; the DPWM
// switches S_w on at the period start and off at the end of S_CS.
// Overcurrent limitation mode: the overcurrent detection part measures
// T_CS = N_CS*T_clk and raises S_oc when T_CS < T_CS*. While S_oc is high
// the N_oc calculation part evaluates the steady-state formula for the
// drive value that holds the load current at I_o_set, and the MUX drives
// the converter with min(N_PID, N_oc).
// This structure (Fig. "control circuit with the overcurrent limitation
// mode" of the reference design) is followed block for block. Own choices:
// one clock `clk` of period Ts/N_TS (1 ns) with T_clk = CLK_DIV cycles;
// a two-flip-flop synchronizer on S_CS; PID and N_oc evaluated CALC_LEAD
// cycles before the end of each period from the latest A-D sample; the A-D
// conversion requested with `adc_trig` at every period start.
//
// Interface: eo_data/eo_valid (A-D result, 14 bits, 500 counts/V),
// i_set_ma (current limit, mA), s_cs (asynchronous detector output), s_d,
// s_w, adc_trig outputs, and `status` for observation.
module dpcm_controller
  import ocl_pkg::*;
#(
  parameter int unsigned NTS       = N_TS,
  parameter int unsigned CALC_LEAD = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [E_W-1:0]   eo_data,
  input  logic             eo_valid,
  input  logic [I_W-1:0]   i_set_ma,
  input  logic             s_cs,
  output logic             s_d,
  output logic             s_w,
  output logic             adc_trig,
  output ctrl_status_t     status
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(NTS);

  logic [1:0]       cs_sync;
  logic             s_cs_s;
  logic [E_W-1:0]   e_o_r;
  logic [CW-1:0]    cnt;
  logic             period_start, period_last, calc;
  logic [N_W-1:0]   n_pid, n_oc, n_drive, n_drive_q;
  logic             pid_valid;
  logic [NCS_W-1:0] n_cs;
  logic             ncs_valid, s_oc, s_cs_star;
  logic             noc_done, noc_busy, n_oc_valid, oc_selected;
  logic [31:0]      e_oc_q;

  // S_CS comes from the analog detector: bring it into the clock domain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cs_sync <= '0;
    else        cs_sync <= {cs_sync[0], s_cs};
  end
  assign s_cs_s = cs_sync[1];

  // latest A-D sample of the output voltage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        e_o_r <= E_W'(N_R);
    else if (eo_valid) e_o_r <= eo_data;
  end

  assign period_last = (cnt == CW'(NTS - 1));
  assign calc        = (cnt == CW'(NTS - CALC_LEAD));
  assign adc_trig    = period_start;

  pid_controller #(.N_MAX(NTS - 1)) u_pid (
    .clk, .rst_n, .calc, .e_o(e_o_r), .n_pid, .valid(pid_valid)
  );

  oc_detector u_ocd (
    .clk, .rst_n, .s_cs(s_cs_s), .s_cs_star, .n_cs, .ncs_valid, .s_oc
  );

  noc_calc #(.N_MAX(NTS - 1)) u_noc (
    .clk, .rst_n, .start(calc && s_oc), .e_o(e_o_r), .n_cs,
    .i_set_ma, .n_oc, .e_oc_q, .busy(noc_busy), .done(noc_done)
  );

  // N_oc is usable once computed in the current overcurrent episode
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        n_oc_valid <= 1'b0;
    else if (!s_oc)    n_oc_valid <= 1'b0;
    else if (noc_done) n_oc_valid <= 1'b1;
  end

  drive_mux u_mux (
    .s_oc, .n_pid, .n_oc, .n_oc_valid, .n_drive, .oc_selected
  );

  delay_circuit #(.NTS(NTS)) u_dly (
    .clk, .rst_n, .n_drive, .cnt, .period_start, .n_drive_q, .s_d
  );

  dpwm u_pwm (
    .clk, .rst_n, .period_start, .period_last, .s_cs(s_cs_s), .s_w
  );

  always_comb begin
    status.n_pid       = n_pid;
    status.n_oc        = n_oc;
    status.n_drive     = n_drive_q;
    status.n_cs        = n_cs;
    status.e_oc_q      = e_oc_q;
    status.s_cs_star   = s_cs_star;
    status.s_oc        = s_oc;
    status.oc_selected = oc_selected;
  end

  // the N_oc calculation must finish before the period it is meant for
  property p_noc_in_time;
    @(posedge clk) disable iff (!rst_n) period_last |-> !noc_busy;
  endproperty
  assert property (p_noc_in_time);

endmodule
