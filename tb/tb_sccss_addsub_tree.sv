// tb_sccss_addsub_tree: random taps and random coefficient bits into the
// 64-tap adder/subtractor tree, a new tap vector every clock and a new set of
// coefficient bits every block of vectors. Each result is compared, exactly
// 7 clocks later, with a direct sum in which tap t carries
// the sign (-1)^(c_hat(t) ^ c_hat(m1) ^ ... ^ c_hat(0)), m1 being t with its
// lowest set bit cleared and so on down to 0. A second part loads the
// coefficients of real codes and checks y = sum d(t) c_k(t) against the chips.
module tb_sccss_addsub_tree;
  import tb_sccss_ref_pkg::*;

  localparam int LOG2 = 6;
  localparam int TAPS = 1 << LOG2;
  localparam int DW   = 8;
  localparam int YW   = DW + LOG2 + 1;
  localparam int LAT  = LOG2 + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [DW-1:0] d [TAPS];
  logic [TAPS-1:0]      chat;
  logic signed [YW-1:0] y;

  sccss_addsub_tree #(.LOG2_TAPS(LOG2), .DW(DW)) dut (.clk(clk), .d(d), .chat(chat), .y(y));

  int cyc = 0;

  function automatic int tree_sum(input logic [TAPS-1:0] ch);
    int s = 0;
    for (int t = 0; t < TAPS; t++) begin
      int u;
      bit sg;
      u = t;
      sg = ch[0];
      while (u != 0) begin
        sg ^= ch[u];
        u = u & (u - 1);
      end
      s += sg ? -int'(d[t]) : int'(d[t]);
    end
    return s;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One queue entry per clock: the expected sum and whether to check it.
  int  expq [$];
  bit  chkq [$];

  task automatic apply(input bit do_check, input int exp);
    expq.push_back(exp);
    chkq.push_back(do_check);
  endtask

  // Advance one clock and compare the result of the vector applied LAT clocks ago.
  task automatic step();
    int  exp;
    bit  chk;
    @(negedge clk);
    cyc++;
    if (expq.size() >= LAT) begin
      exp = expq.pop_front();
      chk = chkq.pop_front();
      if (chk) begin
        checks++;
        if (int'(y) != exp) begin
          failures++;
          if (failures < 20) $display("FAIL clock %0d: y=%0d exp=%0d", cyc, y, exp);
        end
      end
    end
  endtask

  initial begin
    int direct, k;
    @(negedge clk);
    // Part 1: arbitrary coefficient bits, held for a block of vectors; the last
    // LAT vectors of each block are not checked because the next block's
    // coefficients reach them while they are still in the tree.
    for (int blk = 0; blk < 40; blk++) begin
      chat = {$urandom, $urandom};
      if (blk == 0) chat = '0;
      if (blk == 1) chat = TAPS'(1);
      for (int v = 0; v < 12 + LAT; v++) begin
        for (int t = 0; t < TAPS; t++)
          d[t] = (v < 2) ? ((v == 0) ? 8'sh80 : 8'sh7f) : DW'($urandom);
        apply(v < 12, tree_sum(chat));
        step();
      end
    end
    // Part 2: the coefficients of real codes; the result must equal the
    // correlation with the code chips.
    for (int blk = 0; blk < 16; blk++) begin
      k = blk % 8;
      for (int t = 0; t < TAPS; t++) chat[t] = ref_mod_coeff(3, t, k);
      for (int v = 0; v < 8 + LAT; v++) begin
        direct = 0;
        for (int t = 0; t < TAPS; t++) begin
          d[t] = DW'($urandom);
          direct += ref_chip(3, t, k) * int'(d[t]);
        end
        apply(v < 8, direct);
        step();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
