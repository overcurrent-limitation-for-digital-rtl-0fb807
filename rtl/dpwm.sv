// dpwm: switch command S_w of the peak-current-mode converter.
//
// S_w is set at the start of each switching period and cleared on the
// falling edge of S_CS, which the peak current detector produces when the
// integrated inductor current reaches the threshold: the end of S_CS marks
// the current peak and thus the end of the on-time T_on. Both edges follow
// the reference operating waveforms. As a guard of this implementation, S_w
// is also cleared in the last count of a period if no S_CS edge arrived, so
// every period has an off interval.
//
// `s_cs` must already be synchronous to `clk`. S_w is registered: it rises
// one cycle after period_start and falls one cycle after S_CS falls.
module dpwm (
  input  logic clk,
  input  logic rst_n,
  input  logic period_start,
  input  logic period_last,
  input  logic s_cs,
  output logic s_w
);
  timeunit 1ns;
  timeprecision 1ps;

  logic s_cs_d;
  logic cs_fall;

  assign cs_fall = s_cs_d && !s_cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cs_d <= 1'b0;
      s_w    <= 1'b0;
    end else begin
      s_cs_d <= s_cs;
      if (period_start)                s_w <= 1'b1;
      else if (cs_fall || period_last) s_w <= 1'b0;
    end
  end

endmodule
