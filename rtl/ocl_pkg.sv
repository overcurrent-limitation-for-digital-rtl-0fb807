// ocl_pkg: circuit constants and fixed-point scaling shared by the digital
// peak-current-mode controller with overcurrent limitation.
//
// The physical values are those of the reference 15 V -> 5 V buck converter
// (input voltage, inductance, sense resistor, detector time constant, gains,
// switching period and clock period). From them the package derives, at
// elaboration time, the integer constants that the datapath uses, so that a
// different power stage is supported by editing the real-valued constants
// only.
//
// Units used by the datapath:
//   * voltages   : A-D converter counts (1 count = 1/GV volt, GV = 500/V)
//   * currents   : milliamperes
//   * N values   : counts of the delay-circuit timebase, Ts/N_TS = 1 ns
//   * N_CS       : counts of the internal clock, TCLK = 10 ns
//   * fractional : Q.FRAC fixed point, FRAC = 8
package ocl_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // ---------------- power stage and detector (reference design) ----------
  localparam real EI_V      = 15.0;      // input voltage E_i
  localparam real EO_REF_V  = 5.0;       // desired output voltage E_o*
  localparam real L_H       = 175.0e-6;  // inductance L
  localparam real CO_F      = 285.0e-6;  // output capacitance C_o
  localparam real RS_OHM    = 0.05;      // sense resistor R_s
  localparam real R_OHM     = 0.2;       // internal loss r (without R_s)
  localparam real AC_GAIN   = 128.0;     // current pre-amplifier gain A_c
  localparam real TAU_S     = 2.75e-6;   // integrator time constant Ri*Ci
  localparam real VTH_V     = 0.8;       // comparator threshold V_th
  localparam real GV_PER_V  = 500.0;     // e_o analog-to-digital gain G_v
  localparam real TS_S      = 10.0e-6;   // switching period T_s
  localparam real TCLK_S    = 10.0e-9;   // internal clock period T_clk
  localparam real TCS_STAR_S = 330.0e-9; // overcurrent detection time T_CS*

  // ---------------- controller integers ----------------------------------
  localparam int unsigned N_TS    = 10000; // N value that spans one period
  localparam int unsigned N_B     = 2950;  // PID bias N_B
  localparam int unsigned N_R     = 2500;  // digital set point N_R (5 V)
  localparam int unsigned E_W     = 14;    // A-D converter width
  localparam int unsigned N_W     = 14;    // width of N_PID / N_oc / N_Drive
  localparam int unsigned NCS_W   = 12;    // width of the N_CS counter
  localparam int unsigned I_W     = 16;    // width of I_o_set in mA
  localparam int unsigned FRAC    = 8;     // fractional bits of the datapath

  // PID gains, Q16.16
  localparam int unsigned KQ      = 16;
  localparam int KP_Q = 327680;            // 5.0
  localparam int KI_Q = 3932;              // 0.06 (0.059998)
  localparam int KD_Q = 65536;             // 1.0

  // Timebase ticks per internal clock period and per T_CS*
  localparam int unsigned CLK_DIV  = int'(TCLK_S * real'(N_TS) / TS_S);   // 10
  localparam int unsigned NCS_STAR = int'(TCS_STAR_S / TCLK_S);         // 33

  // ---------------- N_oc datapath constants ------------------------------
  // I_peak [mA] = K_PEAK / N_CS                       (Eq. 5 with Eq. 7)
  localparam longint unsigned K_PEAK =
      longint'(TAU_S * VTH_V / (AC_GAIN * RS_OHM * TCLK_S) * 1000.0);  // 34375
  // (r + R_s) * I [mA] expressed in ADC counts, Q.FRAC
  localparam longint unsigned RDROP_Q =
      longint'((R_OHM + RS_OHM) * GV_PER_V / 1000.0 * real'(1 << FRAC)); // 32
  // E_i in ADC counts, Q.FRAC
  localparam longint unsigned EI_Q =
      longint'(EI_V * GV_PER_V * real'(1 << FRAC));                     // 1920000
  // N_TS / (E_i * G_v), Q.C1_SH
  localparam int unsigned C1_SH = 20;
  localparam longint unsigned C1_Q =
      longint'(real'(N_TS) / (EI_V * GV_PER_V) * real'(64'd1 << C1_SH));
  // half ripple [mA] = (E_i - E_oc) * V_on * C2, voltages in counts, Q.C2_SH
  localparam int unsigned C2_SH = 40;
  localparam longint unsigned C2_Q =
      longint'(TS_S * 1000.0 / (2.0 * L_H * EI_V * GV_PER_V * GV_PER_V)
               * real'(64'd1 << C2_SH));
  // tau*V_th*N_TS/(A_c*R_s*T_s) in mA*N (numerator of the second term of Eq. 17)
  localparam longint unsigned C3 =
      longint'(TAU_S * VTH_V * real'(N_TS) / (AC_GAIN * RS_OHM * TS_S) * 1000.0); // 343750

  // Observation bundle of the controller (one switching period's decisions)
  typedef struct packed {
    logic [N_W-1:0]   n_pid;        // PID output N_PID[n]
    logic [N_W-1:0]   n_oc;         // overcurrent-limit value N_oc[n]
    logic [N_W-1:0]   n_drive;      // N_Drive in use this period
    logic [NCS_W-1:0] n_cs;         // last sensing count N_CS
    logic [31:0]      e_oc_q;       // E_o_oc, A-D counts Q.FRAC
    logic             s_cs_star;    // reference pulse S_CS*
    logic             s_oc;         // overcurrent detected
    logic             oc_selected;  // N_oc drives the converter
  } ctrl_status_t;

endpackage
