// tb_seq_divider: random and corner-case divisions on the default 32-bit
// divider, compared with the `/` operator; checks the W+1 cycle latency and
// the all-ones result for a zero denominator.
module tb_seq_divider;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] num, den, quot;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_divider dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot);

  task automatic divide(input logic [31:0] n, input logic [31:0] d);
    int lat;
    logic [31:0] want;
    @(negedge clk);
    num = n; den = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    want = (d == 0) ? '1 : n / d;
    checks++;
    if (quot !== want || lat != 33) begin
      failures++;
      $display("FAIL %0d / %0d = %0d (want %0d), latency %0d", n, d, quot, want, lat);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    divide(100, 7);
    divide(343750 << 8, 329);
    divide(32'hFFFF_FFFF, 1);
    divide(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    divide(5, 9);
    divide(0, 3);
    divide(77, 0);
    for (int i = 0; i < 300; i++)
      divide($urandom, $urandom_range(1, 32'h7FFF_FFFF) >> $urandom_range(0, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
