// ocl_converter_ctrl: complete control side of the digital peak-current-mode
// buck converter with overcurrent limitation.
//
// It joins the digital controller (dpcm_controller: PID, MUX, delay circuit,
// DPWM, overcurrent detection and N_oc calculation) with the analog peak
// current detector, here a behavioural model, so that the loop between the
// delay circuit's S_D, the detector's S_CS and the DPWM is closed inside.
// What remains outside is the power stage: the amplified current-sense
// voltage A_c*e_s (`ac_es`, real, volts) comes in, the switch command S_w
// goes out, and the output voltage arrives as 14-bit A-D samples requested
// with `adc_trig`. Not synthesizable as a whole because of the detector
// model; the digital part alone is dpcm_controller.
//
// Timing: clk period Ts/N_TS (1 ns for Ts = 10 us); see dpcm_controller.
module ocl_converter_ctrl
  import ocl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  real                 ac_es,      // A_c * R_s * i_L, volts
  input  logic [E_W-1:0]      eo_data,
  input  logic                eo_valid,
  input  logic [I_W-1:0]      i_set_ma,   // I_o_set, mA
  output logic                s_w,        // to the drive circuit
  output logic                adc_trig,
  output logic                s_d,
  output logic                s_cs,
  output ctrl_status_t        status
);
  timeunit 1ns;
  timeprecision 1ps;

  peak_current_detector u_pcd (
    .ac_es, .s_d, .s_cs
  );

  dpcm_controller u_ctrl (
    .clk, .rst_n, .eo_data, .eo_valid, .i_set_ma, .s_cs,
    .s_d, .s_w, .adc_trig, .status
  );

endmodule
