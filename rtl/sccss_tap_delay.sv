// sccss_tap_delay: the sample delay line of the parallel FIR correlator.
//
// Each accepted sample (din_valid high) shifts in at the newest end. Tap
// d[TAPS-1] holds the newest sample and d[0] the one accepted TAPS-1 samples
// earlier, so when a code of TAPS chips has arrived in order, chip t sits in
// d[t] and lines up with filter coefficient c(t).
//
// Timing: a sample accepted on one clock edge is in d[TAPS-1] right after it.
// The synchronous reset clears every tap to zero; the ordering of the taps and
// the reset are this design's choice.
module sccss_tap_delay #(
  parameter int unsigned TAPS = 64,           // 4^n taps for an order-2^n set
  parameter int unsigned DW   = 8             // sample width, signed
) (
  input  logic                 clk,
  input  logic                 rst_n,         // synchronous, active low
  input  logic                 din_valid,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] d [TAPS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) d[i] <= '0;
    end else if (din_valid) begin
      for (int i = 0; i < TAPS - 1; i++) d[i] <= d[i+1];
      d[TAPS-1] <= din;
    end
  end

endmodule
