// tb_delay_circuit: measures, at the default N_TS = 10000, the period of the
// timebase and the position and width of the S_D pulse for several N_Drive
// values. Expected: period 10000 cycles, S_D falling at the clock edge
// N_Drive cycles after the period-start edge and low for 10 cycles, no pulse
// when N_Drive >= N_TS.
module tb_delay_circuit;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [13:0] n_drive = '0, n_drive_q;
  logic [13:0] cnt;
  logic        period_start, s_d;
  int checks = 0, failures = 0;
  int t, t_ps, t_fall, t_rise, t_prev_ps;

  always #0.5 clk = ~clk;

  delay_circuit dut (.clk, .rst_n, .n_drive, .cnt, .period_start, .n_drive_q, .s_d);

  // one period of S_D for N_Drive = nd, then the period length
  task automatic measure(input int nd);
    int fall, width, len;
    @(negedge clk);
    n_drive = 14'(nd);
    // the value is taken at the last count; skip to the period that uses it
    @(posedge clk iff period_start);
    @(posedge clk iff (cnt == 14'd9999));
    // edges are numbered from the period start edge (edge 0 = 1 here)
    t_ps = 0; fall = -1; width = 0;
    repeat (10000) begin
      @(posedge clk);
      t_ps++;
      #0.1;
      if (!s_d) begin
        if (fall < 0) fall = t_ps - 1;
        width++;
      end
    end
    checks++;
    if (nd < 10000) begin
      if (fall != nd || width != 10) begin
        failures++;
        $display("FAIL nd=%0d fall at %0d width %0d", nd, fall, width);
      end
    end else if (fall != -1) begin
      failures++;
      $display("FAIL nd=%0d produced a pulse at %0d", nd, fall);
    end
    // period length: edges between two period starts
    @(posedge clk iff period_start);
    len = 0;
    do begin
      @(posedge clk);
      len++;
    end while (!period_start);
    checks++;
    if (len != 10000) begin failures++; $display("FAIL period %0d", len); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(2687);
    measure(0);
    measure(5000);
    measure(9990);
    measure(12000);
    measure(330);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
