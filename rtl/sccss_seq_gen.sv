// sccss_seq_gen: serial generator of the modified coefficients of one SCCSS code.
//
// A pulse on start (while idle) latches the code index k_in and clears the chip
// counter. For the next 4^N_ORD clocks the counter steps t = 0, 1, ... and the
// coefficient generator turns (t, k) into c_hat(t). Every chip can be reached
// directly from its index, so nothing is computed recursively: the counter is
// the only state besides the code register and the output register.
//
// Interface and timing:
//   start/k_in  request one pass over the code; ignored while busy.
//   busy        high from the clock after start until the last index is issued.
//   c_valid     high for exactly 4^N_ORD clocks; c holds c_hat(c_index) then.
//   c_last      marks the final coefficient, c_hat(4^N_ORD - 1).
// The first coefficient appears two clocks after start is sampled.
//
// The counter, the code register and the single output register follow the
// published cost breakdown (2n + n + 1 flip-flops); the start/busy/valid
// handshake and the reset are this design's own choice.
module sccss_seq_gen #(
  parameter int unsigned N_ORD = 3           // order 2^N_ORD: 8 codes of 64 chips
) (
  input  logic               clk,
  input  logic               rst_n,          // synchronous, active low
  input  logic               start,
  input  logic [N_ORD-1:0]   k_in,
  output logic               busy,
  output logic               c_valid,
  output logic               c_last,
  output logic               c
);

  localparam int unsigned TW = 2 * N_ORD;

  logic [TW-1:0]    t_cnt;
  logic [N_ORD-1:0] k_reg;
  logic             at_end;

  assign at_end = (t_cnt == {TW{1'b1}});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      t_cnt   <= '0;
      k_reg   <= '0;
      c_valid <= 1'b0;
      c_last  <= 1'b0;
    end else begin
      c_valid <= busy;
      c_last  <= busy && at_end;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          t_cnt <= '0;
          k_reg <= k_in;
        end
      end else begin
        t_cnt <= t_cnt + 1'b1;
        if (at_end) busy <= 1'b0;
      end
    end
  end

  sccss_coeff_gen #(.N_ORD(N_ORD)) u_coeff (
    .clk (clk),
    .t   (t_cnt),
    .k   (k_reg),
    .c   (c)
  );

endmodule
