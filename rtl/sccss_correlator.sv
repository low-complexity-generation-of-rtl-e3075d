// sccss_correlator: shared, reconfigurable correlator for the codes of a
// scalable complete complementary set of sequences (SCCSS) of order 2^N_ORD.
//
// One parallel FIR filter of TAPS = 4^N_ORD taps serves every code of the set.
// Its adder/subtractor tree needs one bit per tap, the modified coefficient
// c_hat(t); these bits are not stored in a table but produced on demand by the
// counter-driven generator sccss_seq_gen, which needs only the code index.
//
//   load/k_sel   select a code. The generator runs TAPS clocks and shifts
//                c_hat(0..TAPS-1) into the coefficient register; coef_ready
//                drops at once and rises when the register is full. A request
//                while a load is running is ignored (cfg_busy is high then).
//   s_valid/s_data
//                one signed sample per clock at most, into the delay line. The
//                delay line keeps filling during a load.
//   y_valid/y    correlation of the last TAPS samples with the loaded code:
//                y = sum_t d(t) c_k(t), with d(0) the oldest sample. One result
//                per accepted sample, LOG2_TAPS + 1 clocks after the clock
//                edge that accepted it, i.e. when the sample's chip has reached
//                the tree root and passed its sign stage.
// Results are flagged only for samples accepted while coef_ready was high; a
// new load discards results still inside the tree.
//
// The filter structure, the coefficient rule and the generator follow the
// published scheme. The serial loading of a coefficient register, the
// handshake, the flush on reload, the sample width and the reset are this
// design's own choices.
module sccss_correlator #(
  parameter int unsigned N_ORD = 3,           // order 2^N_ORD: 8 codes of 64 chips
  parameter int unsigned DW    = 8,           // sample width, signed
  localparam int unsigned LOG2_TAPS = 2 * N_ORD,
  localparam int unsigned TAPS      = 1 << LOG2_TAPS,
  localparam int unsigned YW        = DW + LOG2_TAPS + 1,
  localparam int unsigned LAT       = LOG2_TAPS + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,          // synchronous, active low
  // code selection
  input  logic                 load,
  input  logic [N_ORD-1:0]     k_sel,
  output logic                 cfg_busy,
  output logic                 coef_ready,
  output logic [N_ORD-1:0]     code,           // code in the coefficient register
  // sample stream
  input  logic                 s_valid,
  input  logic signed [DW-1:0] s_data,
  // correlation output
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  // ---------------------------------------------------------------- coefficients
  logic load_acc;
  logic gen_valid, gen_last, gen_c;
  logic [TAPS-1:0] chat;

  assign load_acc = load && !cfg_busy;

  sccss_seq_gen #(.N_ORD(N_ORD)) u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (load_acc),
    .k_in    (k_sel),
    .busy    (cfg_busy),
    .c_valid (gen_valid),
    .c_last  (gen_last),
    .c       (gen_c)
  );

  // c_hat(0) arrives first and ends up in chat[0] after TAPS shifts.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chat       <= '0;
      coef_ready <= 1'b0;
      code       <= '0;
    end else begin
      if (gen_valid) chat <= {gen_c, chat[TAPS-1:1]};
      if (load_acc) begin
        coef_ready <= 1'b0;
        code       <= k_sel;
      end else if (gen_valid && gen_last) begin
        coef_ready <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- datapath
  logic signed [DW-1:0] taps [TAPS];

  sccss_tap_delay #(.TAPS(TAPS), .DW(DW)) u_delay (
    .clk       (clk),
    .rst_n     (rst_n),
    .din_valid (s_valid),
    .din       (s_data),
    .d         (taps)
  );

  sccss_addsub_tree #(.LOG2_TAPS(LOG2_TAPS), .DW(DW)) u_tree (
    .clk  (clk),
    .d    (taps),
    .chat (chat),
    .y    (y)
  );

  // Valid flags travel alongside the sums through the tree.
  logic [LAT:0] vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n || load_acc) begin
      vpipe <= '0;
    end else begin
      vpipe <= {vpipe[LAT-1:0], s_valid && coef_ready};
    end
  end

  assign y_valid = vpipe[LAT];

  // The coefficient register is never reported ready while a load is running.
  a_ready_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_busy |-> !coef_ready);

endmodule
