// tb_sccss_seq_gen: runs the serial generator once for every code of the
// default order-8 set. Each pass must deliver exactly 64 coefficients, the
// first two clocks after start, c_last on the 64th only, each equal to the
// coefficient derived from the code chips. A second start during a pass, with
// another code, must be ignored.
module tb_sccss_seq_gen;
  import tb_sccss_ref_pkg::*;

  localparam int N = 3;
  localparam int L = 1 << (2 * N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst_n, start, busy, c_valid, c_last, c;
  logic [N-1:0] k_in;

  sccss_seq_gen #(.N_ORD(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .k_in(k_in),
    .busy(busy), .c_valid(c_valid), .c_last(c_last), .c(c)
  );

  task automatic check(input string tag, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", tag, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, cyc, first;
    rst_n = 1'b0; start = 1'b0; k_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && !c_valid);
    for (int k = 0; k < (1 << N); k++) begin
      start = 1'b1; k_in = N'(k);
      @(negedge clk);
      start = 1'b0;
      cnt = 0; cyc = 1; first = -1;
      while (cnt < L && cyc < L + 10) begin
        if (c_valid) begin
          if (first < 0) first = cyc;
          check($sformatf("k=%0d t=%0d value", k, cnt), c == ref_mod_coeff(N, cnt, k));
          check($sformatf("k=%0d t=%0d last", k, cnt), c_last == (cnt == L - 1));
          cnt++;
        end
        if (k == 2 && cnt == 10) begin
          start = 1'b1; k_in = 3'd7;   // must be ignored while busy
        end else begin
          start = 1'b0;
        end
        @(negedge clk);
        cyc++;
      end
      check($sformatf("k=%0d count", k), cnt == L);
      check($sformatf("k=%0d first after 2 clocks", k), first == 2);
      check($sformatf("k=%0d stops", k), !c_valid && !busy);
      repeat (2) @(negedge clk);
      check($sformatf("k=%0d stays idle", k), !c_valid && !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
