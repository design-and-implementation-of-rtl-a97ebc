// Checks the [5:2]^4 adder on random and all-ones inputs:
//   g+c+d+e+f + cin[0..3] == s_o + c_o + 2^W * (cout[0]+..+cout[3])
// exactly, at the width used in the recurrence (W = 5).
module tb_csa52x4;

  localparam int unsigned W = 5;

  logic [W-1:0] g, c, d, e, f, s_o, c_o;
  logic [3:0] cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  csa52x4 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int lhs, rhs;
    #1;
    lhs = int'(g) + int'(c) + int'(d) + int'(e) + int'(f)
        + int'(cin[0]) + int'(cin[1]) + int'(cin[2]) + int'(cin[3]);
    rhs = int'(s_o) + int'(c_o)
        + (int'(cout[0]) + int'(cout[1]) + int'(cout[2]) + int'(cout[3])) * (1 << W);
    checks++;
    if (lhs != rhs) begin
      failures++;
      if (failures < 10) $display("sum %0d, reduced %0d", lhs, rhs);
    end
  endtask

  initial begin
    {g, c, d, e, f} = '1; cin = '1; check();
    for (int i = 0; i < 20000; i++) begin
      g = W'($urandom); c = W'($urandom); d = W'($urandom);
      e = W'($urandom); f = W'($urandom);
      cin = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
