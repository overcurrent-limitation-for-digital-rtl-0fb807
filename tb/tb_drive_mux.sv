// tb_drive_mux: random and corner-case vectors for the N_Drive selection:
// N_PID in regulation mode, min(N_PID, N_oc) in overcurrent mode, never a
// stale N_oc.
module tb_drive_mux;
  timeunit 1ns;
  timeprecision 1ps;

  logic        s_oc, n_oc_valid, oc_selected;
  logic [13:0] n_pid, n_oc, n_drive;
  int checks = 0, failures = 0;
  logic [13:0] exp_n;

  drive_mux dut (.s_oc, .n_pid, .n_oc, .n_oc_valid, .n_drive, .oc_selected);

  task automatic apply(input bit oc, input bit v, input int p, input int o);
    s_oc = oc; n_oc_valid = v; n_pid = 14'(p); n_oc = 14'(o);
    #1;
    exp_n = (oc && v && o < p) ? 14'(o) : 14'(p);
    checks++;
    if (n_drive !== exp_n || oc_selected !== (oc && v && o < p)) begin
      failures++;
      $display("FAIL oc=%0b v=%0b pid=%0d oc=%0d -> %0d sel=%0b", oc, v, p, o, n_drive, oc_selected);
    end
  endtask

  initial begin
    apply(0, 1, 3000, 2000);
    apply(1, 1, 3000, 2000);
    apply(1, 1, 2000, 3000);
    apply(1, 0, 3000, 2000);
    apply(1, 1, 2500, 2500);
    for (int i = 0; i < 500; i++)
      apply($urandom_range(0, 1), $urandom_range(0, 1),
            $urandom_range(0, 9999), $urandom_range(0, 9999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
