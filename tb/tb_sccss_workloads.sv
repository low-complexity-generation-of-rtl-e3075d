// tb_sccss_workloads: the correlator at the three code lengths of the cost
// comparison, 64, 256 and 1024 chips (orders 8, 16 and 32). The 64-chip set
// is swept in full, every code loaded and correlated with a burst of every
// code, which gives the worst-case auto- and cross-correlation profile of the
// set. The larger sets are sampled: a few loaded codes, each against a few
// burst codes, to keep the run short.
module tb_sccss_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done3, done4, done5;
  int   c3, c4, c5, f3, f4, f5;

  sccss_sweep_bench #(.N_ORD(3), .K_CODES(8), .X_CODES(8)) u_n3 (.clk(clk), .done(done3), .checks(c3), .failures(f3));
  sccss_sweep_bench #(.N_ORD(4), .K_CODES(3), .X_CODES(3)) u_n4 (.clk(clk), .done(done4), .checks(c4), .failures(f4));
  sccss_sweep_bench #(.N_ORD(5), .K_CODES(2), .X_CODES(2)) u_n5 (.clk(clk), .done(done5), .checks(c5), .failures(f5));

  int checks, failures;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5, f3 + f4 + f5 + 1);
    $finish;
  end

  initial begin
    wait (done3 && done4 && done5);
    checks   = c3 + c4 + c5;
    failures = f3 + f4 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
