// tb_sccss_coeff_gen: exhaustive check of the modified-coefficient generator.
// Orders 2^2, 2^3 (the default), 2^4 and 2^5 run side by side; every (t, k)
// pair of each order is applied and the registered output is compared, one
// clock later, with the coefficient derived from the code chips. The worked
// example t = 34, k = 5, order 8 (result 0) is checked on its own.
module tb_sccss_coeff_gen;
  import tb_sccss_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  t2;  logic [1:0] k2;  logic c2;
  logic [5:0]  t3;  logic [2:0] k3;  logic c3;
  logic [7:0]  t4;  logic [3:0] k4;  logic c4;
  logic [9:0]  t5;  logic [4:0] k5;  logic c5;

  sccss_coeff_gen #(.N_ORD(2)) dut2 (.clk(clk), .t(t2), .k(k2), .c(c2));
  sccss_coeff_gen              dut3 (.clk(clk), .t(t3), .k(k3), .c(c3));
  sccss_coeff_gen #(.N_ORD(4)) dut4 (.clk(clk), .t(t4), .k(k4), .c(c4));
  sccss_coeff_gen #(.N_ORD(5)) dut5 (.clk(clk), .t(t5), .k(k5), .c(c5));

  task automatic check(input string tag, input logic got, input bit exp, input int t, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0d k=%0d got=%0b exp=%0b", tag, t, k, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i2, i3, i4;
    // worked example, order 8
    @(negedge clk);
    t3 = 6'd34; k3 = 3'd5;
    @(negedge clk);
    check("example", c3, 1'b0, 34, 5);

    for (int idx = 0; idx < 32 * 1024; idx++) begin
      @(negedge clk);
      t5 = idx[9:0];     k5 = idx[14:10];
      i4 = idx % 4096;   t4 = i4[7:0];  k4 = i4[11:8];
      i3 = idx % 512;    t3 = i3[5:0];  k3 = i3[8:6];
      i2 = idx % 64;     t2 = i2[3:0];  k2 = i2[5:4];
      // one clock of latency: the value appears after the next rising edge
      @(posedge clk); #1;
      check("n5", c5, ref_mod_coeff(5, int'(t5), int'(k5)), int'(t5), int'(k5));
      if (idx < 4096) check("n4", c4, ref_mod_coeff(4, int'(t4), int'(k4)), int'(t4), int'(k4));
      if (idx < 512)  check("n3", c3, ref_mod_coeff(3, int'(t3), int'(k3)), int'(t3), int'(k3));
      if (idx < 64)   check("n2", c2, ref_mod_coeff(2, int'(t2), int'(k2)), int'(t2), int'(k2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
