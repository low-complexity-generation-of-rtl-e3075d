// tb_sccss_tap_delay: random samples with random gaps into the 64-tap delay
// line; after each clock every tap is compared with a queue model (d[63] the
// newest accepted sample, d[0] the oldest). Reset must clear all taps.
module tb_sccss_tap_delay;
  localparam int TAPS = 64;
  localparam int DW   = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 rst_n, din_valid;
  logic signed [DW-1:0] din;
  logic signed [DW-1:0] d [TAPS];

  sccss_tap_delay #(.TAPS(TAPS), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .din_valid(din_valid), .din(din), .d(d)
  );

  int model [TAPS];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    rst_n = 1'b0; din_valid = 1'b1; din = 8'sd55;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = 0;
    for (int n = 0; n < 1000; n++) begin
      din_valid = ($urandom % 4) != 0;
      din = $urandom;
      if (din_valid) begin
        for (int i = 0; i < TAPS - 1; i++) model[i] = model[i+1];
        model[TAPS-1] = din;
      end
      @(negedge clk);
      bad = 0;
      for (int i = 0; i < TAPS; i++) if (int'(d[i]) != model[i]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d: %0d taps differ", n, bad);
      end
    end
    rst_n = 1'b0;
    @(negedge clk);
    bad = 0;
    for (int i = 0; i < TAPS; i++) if (d[i] != 0) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL reset leaves %0d taps", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
