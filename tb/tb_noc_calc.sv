// tb_noc_calc: compares N_oc with the steady-state formula evaluated in real
// arithmetic from the circuit values (E_i = 15 V, L = 175 uH, r + R_s =
// 0.25 ohm, tau = 2.75 us, V_th = 0.8 V, A_c = 128, R_s = 0.05 ohm,
// T_clk = 10 ns, Ts = 10 us, N_TS = 10000, G_v = 500/V):
//   I_peak = tau*V_th/(A_c*R_s*N_CS*T_clk),  E_oc = e_o/G_v/I_peak*I_set,
//   N_oc = (E_oc+0.25*I_set)/E_i*N_TS
//          - tau*V_th*N_TS/(A_c*R_s*Ts) / (I_set + (E_i-E_oc)/(2L)*(E_oc+0.25*I_set)/E_i*Ts)
// for the operating points of the reference tests and random ones, with a
// tolerance of 3 counts (3 ns of T_D). Also checks the calculation latency.
module tb_noc_calc;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [13:0] e_o;
  logic [11:0] n_cs;
  logic [15:0] i_set_ma;
  logic [13:0] n_oc;
  logic [31:0] e_oc_q;
  int checks = 0, failures = 0;

  always #0.5 clk = ~clk;

  noc_calc dut (.clk, .rst_n, .start, .e_o, .n_cs, .i_set_ma, .n_oc, .e_oc_q, .busy, .done);

  function automatic real ref_noc(input int e, input int ncs, input int ima, output real eoc);
    real ipk, iset, von, den, n;
    iset = real'(ima) / 1000.0;
    ipk  = 2.75e-6 * 0.8 / (128.0 * 0.05 * real'(ncs) * 10.0e-9);
    eoc  = (real'(e) / 500.0) / ipk * iset;
    if (eoc > 15.0) eoc = 15.0;
    von  = eoc + 0.25 * iset;
    den  = iset + (15.0 - eoc) / (2.0 * 175.0e-6) * von / 15.0 * 10.0e-6;
    n    = von / 15.0 * 10000.0 - 2.75e-6 * 0.8 * 10000.0 / (128.0 * 0.05 * 10.0e-6) / den;
    if (n < 0.0) n = 0.0;
    if (n > 9999.0) n = 9999.0;
    return n;
  endfunction

  task automatic run(input int e, input int ncs, input int ima);
    real want, eoc;
    int lat;
    @(negedge clk);
    e_o = 14'(e); n_cs = 12'(ncs); i_set_ma = 16'(ima);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    want = ref_noc(e, ncs, ima, eoc);
    checks++;
    if (real'(n_oc) < want - 3.0 || real'(n_oc) > want + 3.0) begin
      failures++;
      $display("FAIL e=%0d ncs=%0d i=%0d: N_oc %0d want %0.1f", e, ncs, ima, n_oc, want);
    end
    checks++;
    if (real'(e_oc_q) / 256.0 < eoc * 500.0 - 1.0 || real'(e_oc_q) / 256.0 > eoc * 500.0 + 1.0) begin
      failures++;
      $display("FAIL e=%0d ncs=%0d i=%0d: E_oc %0.1f want %0.1f counts", e, ncs, ima,
               real'(e_oc_q) / 256.0, eoc * 500.0);
    end
    checks++;
    if (lat != 109) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 3 ohm at 1.2 A: E_oc = 3.6 V, N_CS ~ 34.375/1.27 = 27
    run(1800, 27, 1200);
    run(2100, 23, 1400);   // 3 ohm at 1.4 A
    run(1200, 27, 1200);   // 2 ohm
    run(600, 27, 1200);    // 1 ohm
    run(2300, 30, 1200);   // early in the transient, R_o_est > 4 ohm
    run(2500, 33, 1000);
    run(16383, 600, 3000); // E_oc clamps to E_i
    run(100, 1, 1200);     // tiny E_oc, N_oc clamps to 0
    for (int i = 0; i < 50; i++)
      run($urandom_range(300, 3000), $urandom_range(15, 40), $urandom_range(500, 2000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
