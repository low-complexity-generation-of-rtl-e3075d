// sccss_addsub: pipelined two-port adder/subtractor, the cell of the tree
// correlator.
//
// r = a + b when sub = 0 and r = a - b when sub = 1, registered. Operands are
// signed W-bit values; the result has W+1 bits so it never overflows. Only b is
// ever negated: a free sign on both operands is not needed, since the overall
// sign of a tree of such cells is fixed by one extra sign at its root.
//
// Timing: one clock from (a, b, sub) to r, every clock. No reset: the result
// is fully determined one clock after its inputs.
module sccss_addsub #(
  parameter int unsigned W = 8               // operand width
) (
  input  logic                clk,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,           // modified coefficient: 0 add, 1 subtract
  output logic signed [W:0]   r
);

  logic signed [W:0] a_x, b_x;

  assign a_x = {a[W-1], a};
  assign b_x = {b[W-1], b};

  always_ff @(posedge clk) begin
    r <= sub ? (a_x - b_x) : (a_x + b_x);
  end

endmodule
