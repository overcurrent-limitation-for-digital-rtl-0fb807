// buck_plant_model: behavioural model of the buck converter power stage for
// closed-loop simulation (not synthesizable).
//
// Switch Tr, free-wheeling diode D, sense resistor R_s plus internal loss r,
// inductor L, output capacitor C_o and load R_o, integrated with a forward
// Euler step of STEP_NS. The diode is ideal and the inductor current cannot
// reverse (discontinuous conduction is allowed). The current pre-amplifier
// is folded in: ac_es = A_c * R_s * i_L. While `init` is high the state is
// held at EO_INIT / IL_INIT.
module buck_plant_model #(
  parameter real STEP_NS = 1.0,
  parameter real EI      = ocl_pkg::EI_V,
  parameter real L       = ocl_pkg::L_H,
  parameter real CO      = ocl_pkg::CO_F,
  parameter real RSER    = ocl_pkg::R_OHM + ocl_pkg::RS_OHM,
  parameter real ACRS    = ocl_pkg::AC_GAIN * ocl_pkg::RS_OHM,
  parameter real EO_INIT = 5.0,
  parameter real IL_INIT = 0.5
) (
  input  logic s_w,
  input  logic init,
  input  real  r_o,
  output real  i_l,
  output real  e_o,
  output real  ac_es
);
  timeunit 1ns;
  timeprecision 1ps;

  real dt, v_x, di;

  initial begin
    dt    = STEP_NS * 1.0e-9;
    i_l   = IL_INIT;
    e_o   = EO_INIT;
    ac_es = ACRS * IL_INIT;
  end

  always begin
    #(STEP_NS);
    v_x = s_w ? EI : 0.0;
    di  = (v_x - RSER * i_l - e_o) / L * dt;
    e_o = e_o + (i_l - e_o / r_o) / CO * dt;
    i_l = i_l + di;
    if (!s_w && i_l < 0.0) i_l = 0.0;
    if (init) begin
      i_l = IL_INIT;
      e_o = EO_INIT;
    end
    ac_es = ACRS * i_l;
  end

endmodule
