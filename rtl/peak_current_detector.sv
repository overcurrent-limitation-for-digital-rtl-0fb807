// peak_current_detector: behavioural model of the analog peak current
// detector (not synthesizable: RC integrator, comparator and SR flip-flop).
//
// The amplified sense voltage A_c*e_s (input `ac_es`, volts) charges an RC
// integrator Ri-Ci with time constant tau = Ri*Ci. While the flip-flop output
// S_CS is low its inverted output keeps the switch across Ci closed, so the
// capacitor voltage v_rc is held at zero. A low level on S_D (inverted into
// the S input) sets the flip-flop: S_CS goes high, the switch opens and v_rc
// rises as dv_rc/dt = (ac_es - v_rc)/tau. When v_rc exceeds V_th the
// comparator resets the flip-flop, S_CS falls and Ci is discharged again.
// The pulse width T_CS therefore satisfies I_peak ~ tau*V_th/(A_c*R_s*T_CS).
// Circuit topology, tau = 2.75 us and V_th = 0.8 V follow the reference
// design; reset dominance of the flip-flop and the fixed integration step
// STEP_NS are choices of this model.
//
// Interface: ac_es (real, V), s_d (active-low sensing start), s_cs (pulse).
// Time unit 1 ns.
module peak_current_detector #(
  parameter real TAU_S   = ocl_pkg::TAU_S,
  parameter real VTH_V   = ocl_pkg::VTH_V,
  parameter real STEP_NS = 0.25
) (
  input  real  ac_es,
  input  logic s_d,
  output logic s_cs
);
  timeunit 1ns;
  timeprecision 1ps;

  real v_rc;
  real k_step;

  initial begin
    v_rc   = 0.0;
    s_cs   = 1'b0;
    k_step = STEP_NS * 1.0e-9 / TAU_S;
  end

  always begin
    #(STEP_NS);
    if (s_cs) begin
      v_rc = v_rc + (ac_es - v_rc) * k_step;
      if (v_rc > VTH_V) begin
        s_cs = 1'b0;          // comparator resets the flip-flop
        v_rc = 0.0;           // switch closes, Ci discharged
      end
    end else begin
      v_rc = 0.0;
      if (!s_d) s_cs = 1'b1;  // S_D low sets the flip-flop
    end
  end

endmodule
