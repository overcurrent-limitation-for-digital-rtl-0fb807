// oc_detector: overcurrent detection part.
//
// The peak current detector's pulse S_CS lasts T_CS, which is inversely
// proportional to the peak inductor current (I_peak = tau*V_th/(A_c*R_s*T_CS)).
// This block
//   * counts the internal-clock periods T_clk that S_CS is high: N_CS[n]
//     (T_CS = N_CS*T_clk). The timebase clock `clk` is CLK_DIV times faster
//     than T_clk, so a prescaler restarted at the rising edge of S_CS
//     advances N_CS every CLK_DIV cycles;
//   * generates the reference pulse S_CS*, started together with S_CS and
//     lasting T_CS* = NCS_STAR*T_clk;
//   * at the falling edge of S_CS, sets S_oc if S_CS* is still high, i.e.
//     T_CS < T_CS* and so I_peak > I_M, and clears it otherwise.
// The N_CS count, the S_CS*/S_CS comparison and T_CS* = 330 ns follow the
// reference design. Re-evaluating S_oc in every period that has an S_CS
// pulse (so that the controller returns to regulation when the load is
// relieved) and holding it through periods without one is this design's
// choice.
//
// `s_cs` must be synchronous to `clk`. n_cs, s_oc and ncs_valid update in
// the cycle after S_CS is seen low; ncs_valid is a one-cycle strobe.
module oc_detector #(
  parameter int unsigned NCS_W    = ocl_pkg::NCS_W,
  parameter int unsigned CLK_DIV  = ocl_pkg::CLK_DIV,
  parameter int unsigned NCS_STAR = ocl_pkg::NCS_STAR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_cs,
  output logic             s_cs_star,
  output logic [NCS_W-1:0] n_cs,
  output logic             ncs_valid,
  output logic             s_oc
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STAR_TICKS = NCS_STAR * CLK_DIV;
  localparam int unsigned TW = $clog2(STAR_TICKS + 1);
  localparam int unsigned PW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam logic [NCS_W-1:0] NCS_SAT = '1;

  logic             s_cs_d;
  logic [PW-1:0]    pre;
  logic [NCS_W-1:0] ncs_run;
  logic [TW-1:0]    t_star;

  logic             rise, fall;
  logic [PW-1:0]    pre_base;
  logic [NCS_W-1:0] ncs_base;
  logic [TW-1:0]    t_base;

  always_comb begin
    rise      = s_cs && !s_cs_d;
    fall      = !s_cs && s_cs_d;
    pre_base  = rise ? '0 : pre;
    ncs_base  = rise ? '0 : ncs_run;
    t_base    = rise ? '0 : t_star;
    s_cs_star = rise || (32'(t_star) < STAR_TICKS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cs_d    <= 1'b0;
      pre       <= '0;
      ncs_run   <= '0;
      t_star    <= TW'(STAR_TICKS);
      n_cs      <= '1;
      ncs_valid <= 1'b0;
      s_oc      <= 1'b0;
    end else begin
      s_cs_d    <= s_cs;
      ncs_valid <= 1'b0;
      if (rise || 32'(t_star) < STAR_TICKS)
        t_star <= t_base + 1'b1;
      if (s_cs) begin
        if (32'(pre_base) == CLK_DIV - 1) begin
          pre     <= '0;
          ncs_run <= (ncs_base == NCS_SAT) ? NCS_SAT : ncs_base + 1'b1;
        end else begin
          pre     <= pre_base + 1'b1;
          ncs_run <= ncs_base;
        end
      end
      if (fall) begin
        n_cs      <= ncs_run;
        ncs_valid <= 1'b1;
        s_oc      <= s_cs_star;
      end
    end
  end

endmodule
