// tb_sccss_correlator: end-to-end test of the SCCSS correlator at its default
// size (order-8 set, 8 codes of 64 chips, 64 taps, 8-bit samples).
//
// A cycle-level model of the delay line, the code register and the handshake
// runs beside the design. Every output is compared with the direct
// correlation sum_t d(t) c_k(t) over the model's taps, where the chips c_k(t)
// come from the closed-form Hadamard construction, and must arrive exactly
// 7 clocks after the edge that accepted its sample. coef_ready, cfg_busy and
// code are compared every clock, so the load time (65 clocks) is checked too.
//
// Isolated bursts of one code's chips, framed by zeros, check the set's
// correlation properties on the design's own outputs: the aligned
// auto-correlation equals 64, and at every other shift that is a multiple of
// 8 both auto- and cross-correlation are 0.
//
// Mechanisms that must each occur at least once: a code reload, a reload
// that discards results still in the tree, a load request ignored while a
// load runs, samples accepted during a load (no output), idle input clocks,
// an auto-correlation peak and zero correlation at a multiple-of-8 shift.
module tb_sccss_correlator;
  import tb_sccss_ref_pkg::*;

  localparam int N    = 3;
  localparam int TAPS = 64;
  localparam int DW   = 8;
  localparam int YW   = DW + 2 * N + 1;
  localparam int LAT  = 2 * N + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 rst_n, load, cfg_busy, coef_ready, s_valid, y_valid;
  logic [N-1:0]         k_sel, code;
  logic signed [DW-1:0] s_data;
  logic signed [YW-1:0] y;

  sccss_correlator dut (
    .clk(clk), .rst_n(rst_n),
    .load(load), .k_sel(k_sel), .cfg_busy(cfg_busy), .coef_ready(coef_ready), .code(code),
    .s_valid(s_valid), .s_data(s_data),
    .y_valid(y_valid), .y(y)
  );

  // ------------------------------------------------------------------ model
  typedef struct {
    int exp;
    int due;
    bit in_burst;      // part of an isolated burst
    int shift;       // burst chips in the line minus 64
    bit same;        // burst code equals the loaded code
  } exp_t;

  exp_t q [$];
  int   dl [TAPS];
  int   cyc = 0;
  bit   m_ready = 0;
  int   ready_due = -1, busy_start = -1, busy_end = -2;
  int   m_code = 0;
  int   burst_p = -1, burst_x = 0;   // burst chips accepted so far, -1 outside a burst

  // mechanism counters
  int n_reload = 0, n_flush = 0, n_ignored = 0, n_during_load = 0, n_idle = 0;
  int n_peak = 0, n_auto_zero = 0, n_cross_zero = 0, n_outputs = 0;

  task automatic check(input string tag, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (clock %0d)", tag, cyc);
    end
  endtask

  // One clock: check what the design shows now, drive the inputs for the next
  // rising edge, update the model as of that edge, then move to the next
  // falling edge.
  task automatic cycle(input bit ld, input int kk, input bit sv, input int sd);
    exp_t e;
    bit   acc;
    int   sum;
    // ---- outputs visible now
    check("coef_ready", coef_ready == m_ready);
    check("cfg_busy", cfg_busy == (cyc >= busy_start && cyc <= busy_end));
    check("code", int'(code) == m_code);
    if (y_valid) begin
      n_outputs++;
      if (q.size() == 0) begin
        check("unexpected output", 1'b0);
      end else begin
        e = q.pop_front();
        check($sformatf("y=%0d exp=%0d", y, e.exp), int'(y) == e.exp);
        check($sformatf("latency due=%0d", e.due), cyc == e.due);
        if (e.in_burst && (e.shift % 8) == 0) begin
          if (e.shift == 0 && e.same) begin
            check("auto-correlation peak", int'(y) == TAPS);
            n_peak++;
          end else begin
            check($sformatf("zero at shift %0d", e.shift), int'(y) == 0);
            if (e.same) n_auto_zero++; else n_cross_zero++;
          end
        end
      end
    end else if (q.size() != 0 && q[0].due <= cyc) begin
      check("missing output", 1'b0);
      void'(q.pop_front());
    end
    // ---- inputs for the next edge
    load = ld; k_sel = N'(kk); s_valid = sv; s_data = DW'(sd);
    acc = ld && !cfg_busy;
    if (acc) begin
      n_reload++;
      if (q.size() != 0) n_flush++;
      q.delete();
      m_ready    = 1'b0;
      ready_due  = cyc + TAPS + 2;
      busy_start = cyc + 1;
      busy_end   = cyc + TAPS;
      m_code     = kk;
    end else if (ld) begin
      n_ignored++;
    end
    if (sv) begin
      for (int t = 0; t < TAPS - 1; t++) dl[t] = dl[t+1];
      dl[TAPS-1] = sd;
      if (burst_p >= 0) burst_p++;
      if (m_ready && !acc) begin
        sum = 0;
        for (int t = 0; t < TAPS; t++) sum += dl[t] * ref_chip(N, t, m_code);
        e.exp    = sum;
        e.due    = cyc + LAT + 1;
        e.in_burst = burst_p > 0 && burst_p < 2 * TAPS;
        e.shift  = burst_p - TAPS;
        e.same   = burst_x == m_code;
        q.push_back(e);
      end else if (!m_ready) begin
        n_during_load++;
      end
      if (burst_p >= 2 * TAPS - 1) burst_p = -1;
    end else if (m_ready) begin
      n_idle++;
    end
    @(negedge clk);
    cyc++;
    if (cyc == ready_due) m_ready = 1'b1;
  endtask

  // Samples with an idle clock now and then.
  task automatic feed(input int sd);
    if (($urandom % 6) == 0) cycle(1'b0, 0, 1'b0, 0);
    cycle(1'b0, 0, 1'b1, sd);
  endtask

  task automatic feed_random(input int count);
    for (int n = 0; n < count; n++) feed(int'($urandom % 256) - 128);
  endtask

  // 64 zeros, the 64 chips of code x, 64 zeros.
  task automatic feed_burst(input int x);
    for (int n = 0; n < TAPS; n++) feed(0);
    burst_p = 0;
    burst_x = x;
    for (int t = 0; t < TAPS; t++) feed(ref_chip(N, t, x));
    for (int n = 0; n < TAPS; n++) feed(0);
  endtask

  // Request a load and keep samples flowing until the coefficients are ready;
  // one extra request is made while the load runs.
  task automatic reload(input int k);
    cycle(1'b1, k, 1'b1, int'($urandom % 256) - 128);
    for (int n = 0; n < TAPS + 8 && !m_ready; n++) begin
      if (n == 5) cycle(1'b1, (k + 1) % 8, 1'b1, 7);
      else        cycle(1'b0, 0, 1'b1, int'($urandom % 256) - 128);
    end
    check("ready after load", m_ready);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; k_sel = '0; s_valid = 1'b0; s_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (dl[t]) dl[t] = 0;
    // no code loaded yet: samples go in, nothing comes out
    for (int n = 0; n < 20; n++) cycle(1'b0, 0, 1'b1, n);
    for (int k = 0; k < 8; k++) begin
      reload(k);
      feed_random(40);
      feed_burst(k);
      feed_burst((k + 3) % 8);
      feed_random(20);
    end
    // reload while results are in the tree, back to back
    feed_random(3);
    reload(5);
    feed_burst(5);
    for (int n = 0; n < 3 * LAT; n++) cycle(1'b0, 0, 1'b0, 0);
    check("no result left behind", q.size() == 0);

    $display("mechanisms: reload=%0d flush=%0d ignored=%0d during_load=%0d idle=%0d peak=%0d auto_zero=%0d cross_zero=%0d outputs=%0d",
             n_reload, n_flush, n_ignored, n_during_load, n_idle, n_peak, n_auto_zero, n_cross_zero, n_outputs);
    check("mechanism reload",       n_reload >= 2);
    check("mechanism flush",        n_flush >= 1);
    check("mechanism ignored load", n_ignored >= 1);
    check("mechanism during load",  n_during_load >= 1);
    check("mechanism idle input",   n_idle >= 1);
    check("mechanism peak",         n_peak >= 1);
    check("mechanism auto zero",    n_auto_zero >= 1);
    check("mechanism cross zero",   n_cross_zero >= 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
