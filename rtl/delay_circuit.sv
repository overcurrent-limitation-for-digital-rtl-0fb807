// delay_circuit: switching-period timebase and sensing-start signal S_D.
//
// A counter runs from 0 to N_TS-1 once per switching period Ts, so one count
// is Ts/N_TS (1 ns with the reference values, N_TS = 10000, Ts = 10 us).
// N_Drive is registered at the last count of a period and used for the
// whole next period. S_D is normally high and drops for SD_PULSE counts when
// the counter reaches N_Drive, i.e. after T_D = N_Drive/N_TS * Ts (Eq. 2).
// The falling edge of S_D sets the detector flip-flop and starts current
// sensing. The relation T_D = N_Drive/N_TS*Ts and the high-low-high shape of
// S_D follow the reference design; the pulse width is this implementation's
// choice. If N_Drive >= N_TS no pulse is issued in that period.
//
// Outputs: `cnt` (position in the period), `period_start` (high during count
// 0), `s_d` (registered). S_D falls at the clock edge that ends count
// N_Drive, exactly N_Drive cycles after the edge that ends count 0 (the edge
// at which the DPWM turns S_w on), so T_D is measured from the switch-on.
module delay_circuit #(
  parameter int unsigned NW       = ocl_pkg::N_W,
  parameter int unsigned NTS      = ocl_pkg::N_TS,
  parameter int unsigned SD_PULSE = ocl_pkg::CLK_DIV,
  parameter int unsigned CW       = $clog2(NTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n_drive,
  output logic [CW-1:0] cnt,
  output logic          period_start,
  output logic [NW-1:0] n_drive_q,    // value in use this period
  output logic          s_d
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [CW-1:0] LAST = CW'(NTS - 1);

  logic in_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      n_drive_q <= '0;
      s_d       <= 1'b1;
    end else begin
      cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
      if (cnt == LAST) n_drive_q <= n_drive;
      s_d <= ~in_pulse;
    end
  end

  always_comb begin
    period_start = (cnt == '0);
    in_pulse = ({1'b0, cnt} >= (CW+1)'(n_drive_q)) &&
               (32'(cnt) < 32'(n_drive_q) + SD_PULSE);
  end

endmodule
