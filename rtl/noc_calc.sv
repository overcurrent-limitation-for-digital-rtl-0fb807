// noc_calc: N_oc calculation part of the overcurrent limiter.
//
// From the latest output-voltage sample e_o[n] (A-D counts), the sensing
// count N_CS[n] and the current limit I_o_set (mA) it computes the drive
// value N_oc[n] that makes the steady-state load current equal to I_o_set:
//   I_peak   = K_PEAK / N_CS                      (detector law, Eq. 5/7)
//   R_o_est  = e_o / (G_v * I_peak)               (Eq. 18)
//   E_o_oc   = R_o_est * I_o_set                  (Eq. 19)
//   V_on     = E_o_oc + (r+R_s)*I_o_set
//   N_oc     = V_on/E_i*N_TS
//              - C3 / (I_o_set + (E_i-E_o_oc)/(2L)*V_on/E_i*Ts)   (Eq. 17)
// The formulas are those of the reference design. The arithmetic is this
// implementation's: voltages in A-D counts with FRAC fractional bits, the
// constant factors taken from ocl_pkg, and the two divisions (by K_PEAK and
// by the bracketed current) done one after the other on a shared
// restoring divider. E_o_oc is clamped to E_i and N_oc to 0..N_MAX.
//
// Timing: `start` latches the inputs; `done` pulses 2*DW+9 cycles later
// (109 cycles at the defaults, DW = 50) with n_oc and e_oc updated.
module noc_calc
  import ocl_pkg::*;
#(
  parameter int unsigned EW    = E_W,
  parameter int unsigned NCSW  = NCS_W,
  parameter int unsigned IW    = I_W,
  parameter int unsigned NW    = N_W,
  parameter int unsigned F     = FRAC,
  parameter longint unsigned KPK   = K_PEAK,
  parameter longint unsigned RDQ   = RDROP_Q,
  parameter longint unsigned EIQ   = EI_Q,
  parameter longint unsigned C1    = C1_Q,
  parameter int unsigned     C1S   = C1_SH,
  parameter longint unsigned C2    = C2_Q,
  parameter int unsigned     C2S   = C2_SH,
  parameter longint unsigned C3N   = C3,
  parameter int unsigned     N_MAX = N_TS - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [EW-1:0]   e_o,
  input  logic [NCSW-1:0] n_cs,
  input  logic [IW-1:0]   i_set_ma,
  output logic [NW-1:0]   n_oc,
  output logic [31:0]     e_oc_q,   // E_o_oc in A-D counts, Q.F
  output logic            busy,
  output logic            done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DW = EW + NCSW + IW + F;

  typedef enum logic [2:0] {S_IDLE, S_DIV1, S_VON, S_TERMS, S_DEN, S_DIV2, S_OUT} state_t;
  state_t state;

  logic [IW-1:0]   i_set_r;
  logic [DW-1:0]   div_num, div_den, div_q;
  logic            div_start, div_done;
  logic [31:0]     v_on_q;       // Q.F counts
  logic [63:0]     term1;
  logic [31:0]     den_q;        // Q.F mA, I_o_set plus half the ripple
  logic [127:0]    rip_prod;

  assign den_q = (32'(i_set_r) << F) + 32'(rip_prod >> (F + C2S));

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n,
    .start(div_start), .num(div_num), .den(div_den),
    .busy(), .done(div_done), .quot(div_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i_set_r   <= '0;
      div_num   <= '0;
      div_den   <= '0;
      div_start <= 1'b0;
      v_on_q    <= '0;
      term1     <= '0;
      rip_prod  <= '0;
      e_oc_q    <= '0;
      n_oc      <= '0;
      done      <= 1'b0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_set_r   <= i_set_ma;
          div_num   <= (DW'(e_o) * DW'(n_cs) * DW'(i_set_ma)) << F;
          div_den   <= DW'(KPK);
          div_start <= 1'b1;
          state     <= S_DIV1;
        end
        S_DIV1: if (div_done) begin
          e_oc_q <= (64'(div_q) > EIQ) ? 32'(EIQ) : 32'(div_q);
          state  <= S_VON;
        end
        S_VON: begin
          v_on_q   <= e_oc_q + 32'(RDQ * 64'(i_set_r));
          state    <= S_TERMS;
        end
        S_TERMS: begin
          term1    <= (64'(v_on_q) * C1) >> (F + C1S);
          rip_prod <= 128'(32'(EIQ) - e_oc_q) * 128'(v_on_q) * 128'(C2);
          state    <= S_DEN;
        end
        S_DEN: begin
          // I_o_set plus half the inductor ripple, Q.F mA
          div_num   <= DW'(C3N) << F;
          div_den   <= DW'(den_q);
          div_start <= 1'b1;
          state     <= S_DIV2;
        end
        S_DIV2: if (div_done) state <= S_OUT;
        S_OUT: begin
          if (64'(div_q) >= term1)           n_oc <= '0;
          else if (term1 - 64'(div_q) > 64'(N_MAX)) n_oc <= NW'(N_MAX);
          else                               n_oc <= NW'(term1 - 64'(div_q));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
