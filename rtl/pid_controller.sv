// pid_controller: output-voltage regulator of the peak-current-mode loop.
//
// Once per switching period (on `calc`) it evaluates
//   N_PID[n] = N_B - KP*(e[n-1]-N_R) - KI*sum(e[n-1]-N_R) - KD*(e[n-1]-e[n-2])
// where e[n-1] is the most recent A-D sample of the output voltage (`e_o`)
// and e[n-2] the sample used in the previous evaluation. The equation, bias,
// set point and gains are those of the reference design; the fixed-point
// format (Q16 gains, 32-bit saturating error sum, result clamped to
// 0..N_MAX) is this implementation's choice. The error sum has no
// anti-windup: it keeps integrating while the overcurrent limiter holds the
// output voltage low, as the reference waveforms show.
//
// Timing: `n_pid` and `valid` are registered one cycle after `calc`.
// Reset clears the error sum and loads e[n-2] with N_R.
module pid_controller
  import ocl_pkg::*;
#(
  parameter int unsigned EW    = E_W,
  parameter int unsigned NW    = N_W,
  parameter int unsigned NB    = N_B,
  parameter int unsigned NR    = N_R,
  parameter int unsigned N_MAX = N_TS - 1,
  parameter int          KP    = KP_Q,
  parameter int          KI    = KI_Q,
  parameter int          KD    = KD_Q,
  parameter int unsigned GSH   = KQ
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          calc,      // one-cycle strobe, once per period
  input  logic [EW-1:0] e_o,       // latest A-D sample e_o
  output logic [NW-1:0] n_pid,
  output logic          valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int SUM_W = 32;
  localparam logic signed [SUM_W-1:0] SUM_MAX = {1'b0, {(SUM_W-1){1'b1}}};
  localparam logic signed [SUM_W-1:0] SUM_MIN = {1'b1, {(SUM_W-1){1'b0}}};

  logic signed [SUM_W-1:0] err_sum;
  logic [EW-1:0]           e_prev;

  logic signed [EW+1:0]    err, derr;
  logic signed [SUM_W:0]   sum_next_w;
  logic signed [SUM_W-1:0] sum_next;
  logic signed [63:0]      corr, n_full;

  always_comb begin
    err        = $signed({2'b00, e_o}) - $signed((EW+2)'(NR));
    derr       = $signed({2'b00, e_o}) - $signed({2'b00, e_prev});
    sum_next_w = (SUM_W+1)'(err_sum) + (SUM_W+1)'(err);
    if (sum_next_w > (SUM_W+1)'(SUM_MAX))      sum_next = SUM_MAX;
    else if (sum_next_w < (SUM_W+1)'(SUM_MIN)) sum_next = SUM_MIN;
    else                                       sum_next = sum_next_w[SUM_W-1:0];
    corr   = 64'(KP) * 64'(err) + 64'(KI) * 64'(sum_next) + 64'(KD) * 64'(derr);
    n_full = $signed(64'(NB)) - (corr >>> GSH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_sum <= '0;
      e_prev  <= EW'(NR);
      n_pid   <= NW'(NB);
      valid   <= 1'b0;
    end else begin
      valid <= calc;
      if (calc) begin
        err_sum <= sum_next;
        e_prev  <= e_o;
        if (n_full < 0)                 n_pid <= '0;
        else if (n_full > 64'(N_MAX))   n_pid <= NW'(N_MAX);
        else                            n_pid <= NW'(n_full);
      end
    end
  end

endmodule
