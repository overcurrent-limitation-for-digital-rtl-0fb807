// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// `start` loads numerator and denominator; `done` pulses W+1 cycles later
// with quot = num / den (truncated). A zero denominator gives an all-ones
// quotient. `busy` is high while a division is in progress; a start while
// busy is ignored. Used by the N_oc calculation; the reference design does
// not say how its divisions are done, so this shared sequential divider is
// this implementation's choice (small, and far faster than one switching
// period needs).
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = $clog2(W + 1);

  logic [W-1:0]     rem;
  logic [W-1:0]     q;
  logic [W-1:0]     d;
  logic [CNT_W-1:0] bits_left;
  logic [W:0]       trial;

  assign trial = {rem, q[W-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem       <= '0;
      q         <= '0;
      d         <= '0;
      bits_left <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quot      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem       <= '0;
        q         <= num;
        d         <= den;
        bits_left <= CNT_W'(W);
        busy      <= 1'b1;
      end else if (busy) begin
        if (trial[W]) begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end else begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end
        bits_left <= bits_left - 1'b1;
        if (bits_left == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= trial[W] ? {q[W-2:0], 1'b0} : {q[W-2:0], 1'b1};
        end
      end
    end
  end

endmodule
