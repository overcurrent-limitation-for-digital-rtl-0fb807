// adc_model: behavioural model of the output-voltage pre-amplifier and the
// 14-bit A-D converter (not synthesizable). On a rising `trig` it samples
// e_o, converts it with gain GV counts per volt (rounded, clipped to
// 0..2^14-1) and, LATENCY clock cycles later, presents the result on `data`
// with a one-cycle `valid` strobe.
module adc_model #(
  parameter real         GV      = ocl_pkg::GV_PER_V,
  parameter int unsigned LATENCY = 500
) (
  input  logic        clk,
  input  logic        trig,
  input  real         e_o,
  output logic [13:0] data,
  output logic        valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic trig_d = 1'b0;
  real  v;
  int   code;
  int   wait_cnt = 0;

  initial begin
    data  = 14'd2500;
    valid = 1'b0;
  end

  always @(posedge clk) begin
    trig_d <= trig;
    valid  <= 1'b0;
    if (trig && !trig_d) begin
      v = e_o * GV;
      code = (v < 0.0) ? 0 : $rtoi(v + 0.5);
      if (code > 16383) code = 16383;
      wait_cnt <= LATENCY;
    end else if (wait_cnt > 0) begin
      wait_cnt <= wait_cnt - 1;
      if (wait_cnt == 1) begin
        data  <= 14'(code);
        valid <= 1'b1;
      end
    end
  end

endmodule
