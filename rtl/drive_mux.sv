// drive_mux: selects the drive value N_Drive that sets the sensing delay T_D.
//
// In regulation mode (s_oc low) N_Drive follows the PID output. Once the
// overcurrent detection signal S_oc is high, the smaller of N_PID and N_oc
// is taken, so the changeover between the two control laws is smooth: the
// limiter only takes over when it asks for a shorter on-time than the
// voltage loop. This selection rule is the reference design's. A stale N_oc
// (n_oc_valid low, no calculation finished yet) is never selected.
//
// Purely combinational; the delay circuit registers N_Drive at the start of
// each switching period.
module drive_mux #(
  parameter int unsigned NW = ocl_pkg::N_W
) (
  input  logic          s_oc,        // overcurrent limitation mode
  input  logic [NW-1:0] n_pid,
  input  logic [NW-1:0] n_oc,
  input  logic          n_oc_valid,  // n_oc holds a finished result
  output logic [NW-1:0] n_drive,
  output logic          oc_selected  // N_oc is the value in use
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    oc_selected = s_oc && n_oc_valid && (n_oc < n_pid);
    n_drive     = oc_selected ? n_oc : n_pid;
  end

endmodule
