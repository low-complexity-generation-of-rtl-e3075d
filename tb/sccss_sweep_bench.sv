// sccss_sweep_bench: drives one sccss_correlator of order 2^N_ORD through a
// correlation sweep and checks it; instantiated by tb_sccss_workloads.
//
// For each of the first K_CODES codes it loads the code (the load must take
// 4^N_ORD + 1 clocks) and then, for each of X_CODES burst codes x, streams
// 4^N_ORD zeros, the chips of code x and 4^N_ORD zeros, one sample per clock.
// Every output is compared with the direct correlation over a model of the
// delay line and must come 2*N_ORD + 1 clocks after its sample. At every shift
// that is a multiple of 2^N_ORD the output must be 4^N_ORD for the aligned
// auto-correlation and 0 otherwise. The worst-case magnitude over all other
// shifts is reported for auto- and cross-correlation.
module sccss_sweep_bench #(
  parameter int N_ORD   = 3,
  parameter int K_CODES = 8,
  parameter int X_CODES = 8
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_sccss_ref_pkg::*;

  localparam int TAPS = 1 << (2 * N_ORD);
  localparam int SET  = 1 << N_ORD;
  localparam int DW   = 8;
  localparam int YW   = DW + 2 * N_ORD + 1;
  localparam int LAT  = 2 * N_ORD + 1;

  logic                 rst_n, load, cfg_busy, coef_ready, s_valid, y_valid;
  logic [N_ORD-1:0]     k_sel, code;
  logic signed [DW-1:0] s_data;
  logic signed [YW-1:0] y;

  sccss_correlator #(.N_ORD(N_ORD), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n),
    .load(load), .k_sel(k_sel), .cfg_busy(cfg_busy), .coef_ready(coef_ready), .code(code),
    .s_valid(s_valid), .s_data(s_data),
    .y_valid(y_valid), .y(y)
  );

  typedef struct {
    int exp;
    int due;
    int shift;
    bit same;
  } exp_t;

  int   chips [SET][TAPS];
  int   dl [TAPS];
  exp_t q [$];
  int   cyc = 0;
  int   worst_auto = 0, worst_cross = 0, n_zero = 0, n_peak = 0;

  task automatic check(input string tag, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL order %0d: %s (clock %0d)", SET, tag, cyc);
    end
  endtask

  task automatic tick();
    exp_t e;
    int   mag;
    @(negedge clk);
    cyc++;
    if (y_valid) begin
      if (q.size() == 0) begin
        check("unexpected output", 1'b0);
      end else begin
        e = q.pop_front();
        check($sformatf("y=%0d exp=%0d", y, e.exp), int'(y) == e.exp);
        check("latency", cyc == e.due);
        mag = (int'(y) < 0) ? -int'(y) : int'(y);
        if (e.shift % SET == 0) begin
          if (e.shift == 0 && e.same) begin
            check("peak", int'(y) == TAPS);
            n_peak++;
          end else begin
            check($sformatf("zero at shift %0d", e.shift), int'(y) == 0);
            n_zero++;
          end
        end else if (e.same) begin
          if (mag > worst_auto) worst_auto = mag;
        end else begin
          if (mag > worst_cross) worst_cross = mag;
        end
      end
    end
  endtask

  // Send one sample; p is the number of burst chips in the line after it
  // (-1 outside the burst window), x the burst code, k the loaded code.
  task automatic send(input int sd, input int p, input int x, input int k);
    exp_t e;
    int   sum;
    s_valid = 1'b1;
    s_data  = DW'(sd);
    for (int t = 0; t < TAPS - 1; t++) dl[t] = dl[t+1];
    dl[TAPS-1] = sd;
    sum = 0;
    for (int t = 0; t < TAPS; t++) sum += dl[t] * chips[k][t];
    e.exp   = sum;
    e.due   = cyc + LAT + 1;
    e.shift = (p > 0 && p < 2 * TAPS) ? p - TAPS : 1;
    e.same  = (x == k);
    q.push_back(e);
    tick();
  endtask

  initial begin
    int t0, x;
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 0; k < SET; k++)
      for (int t = 0; t < TAPS; t++) chips[k][t] = ref_chip(N_ORD, t, k);
    foreach (dl[t]) dl[t] = 0;
    rst_n = 1'b0; load = 1'b0; k_sel = '0; s_valid = 1'b0; s_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < K_CODES; k++) begin
      // load code k
      load = 1'b1; k_sel = N_ORD'(k); s_valid = 1'b0;
      tick();
      load = 1'b0;
      t0 = cyc;
      while (!coef_ready && cyc < t0 + TAPS + 10) tick();
      check($sformatf("load time %0d", cyc - t0), cyc - t0 == TAPS + 1);
      for (int xi = 0; xi < X_CODES; xi++) begin
        x = (k + xi) % SET;
        for (int n = 0; n < TAPS; n++) send(0, -1, x, k);
        for (int n = 0; n < 2 * TAPS; n++)
          send((n < TAPS) ? chips[x][n] : 0, n + 1, x, k);
      end
      s_valid = 1'b0;
      for (int n = 0; n < LAT + 2; n++) tick();
      check("all results out", q.size() == 0);
    end
    check("peaks seen", n_peak == K_CODES);
    check("zeros seen", n_zero > 0);
    $display("order %0d (%0d-chip codes): %0d loads x %0d bursts, peaks=%0d zeros=%0d worst auto sidelobe=%0d worst cross=%0d",
             SET, TAPS, K_CODES, X_CODES, n_peak, n_zero, worst_auto, worst_cross);
    done = 1'b1;
  end
endmodule
