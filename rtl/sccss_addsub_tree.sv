// sccss_addsub_tree: parallel FIR sum y = sum_t d(t) * c(t), c(t) in {+1,-1},
// built from a binary tree of two-port adder/subtractors.
//
// With TAPS = 2^LOG2_TAPS inputs the tree has LOG2_TAPS levels. The cell that
// joins the block of taps [t - 2^l, t) (operand A) with the block [t, t + 2^l)
// (operand B) sits at level l, where l is the lowest set bit of t, and is
// steered by the modified coefficient c_hat(t): A + B for 0, A - B for 1. The
// remaining coefficient c_hat(0) sets the sign of the root sum. So tap t enters
// y with the sign (-1)^(c_hat(t) xor c_hat(m) xor ... xor c_hat(0)), where
// m is t with its lowest set bit cleared, and so on down to 0.
//
// Interface: d[] are signed DW-bit taps (d[0] first), chat[t] is c_hat(t).
// Each level adds one bit; y has DW + LOG2_TAPS + 1 bits, enough for the
// root's sign change. Timing: every level and the root sign are registered,
// so y follows d and chat by LOG2_TAPS + 1 clocks, with a new result each clock.
// chat must be held steady while a sum travels through the tree.
// The tree shape and the cell assignment follow the published derivation; the
// widths, the registered root sign and the tap order are this design's choice.
module sccss_addsub_tree #(
  parameter int unsigned LOG2_TAPS = 6,       // 64 taps: order-8 set, 64-chip codes
  parameter int unsigned DW        = 8,       // tap width, signed
  localparam int unsigned TAPS     = 1 << LOG2_TAPS,
  localparam int unsigned YW       = DW + LOG2_TAPS + 1
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] d [TAPS],
  input  logic [TAPS-1:0]      chat,
  output logic signed [YW-1:0] y
);

  for (genvar lv = 0; lv < LOG2_TAPS; lv++) begin : g_lvl
    localparam int unsigned WI    = DW + lv;                  // operand width at this level
    localparam int unsigned NODES = TAPS >> (lv + 1);
    logic signed [WI:0] r [NODES];

    for (genvar m = 0; m < NODES; m++) begin : g_node
      logic signed [WI-1:0] a, b;
      if (lv == 0) begin : g_leaf
        assign a = d[2*m];
        assign b = d[2*m+1];
      end else begin : g_inner
        assign a = g_lvl[lv-1].r[2*m];
        assign b = g_lvl[lv-1].r[2*m+1];
      end
      sccss_addsub #(.W(WI)) u_cell (
        .clk (clk),
        .a   (a),
        .b   (b),
        .sub (chat[(2*m+1) << lv]),
        .r   (r[m])
      );
    end
  end

  // Root sign, steered by c_hat(0).
  logic signed [YW-1:0] root_x;
  assign root_x = {g_lvl[LOG2_TAPS-1].r[0][YW-2], g_lvl[LOG2_TAPS-1].r[0]};

  always_ff @(posedge clk) begin
    y <= chat[0] ? -root_x : root_x;
  end

endmodule
