// tb_sccss_addsub: random and corner operands through the two-port
// adder/subtractor, result compared one clock later with integer arithmetic.
module tb_sccss_addsub;
  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [W-1:0] a, b;
  logic                sub;
  logic signed [W:0]   r;

  sccss_addsub #(.W(W)) dut (.clk(clk), .a(a), .b(b), .sub(sub), .r(r));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, exp;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case (n)
        0: begin a = -128; b = -128; sub = 1'b0; end
        1: begin a = -128; b =  127; sub = 1'b1; end
        2: begin a =  127; b = -128; sub = 1'b1; end
        3: begin a =  127; b =  127; sub = 1'b0; end
        default: begin a = $urandom; b = $urandom; sub = $urandom; end
      endcase
      ea = a; eb = b;
      exp = sub ? ea - eb : ea + eb;
      @(posedge clk); #1;
      checks++;
      if (int'(r) != exp) begin
        failures++;
        if (failures < 20) $display("FAIL a=%0d b=%0d sub=%0b r=%0d exp=%0d", ea, eb, sub, r, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
