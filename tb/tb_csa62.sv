// Checks the [6:2] carry-save adder on random and all-ones inputs:
//   a+b+c+d+e+f + cin[0..3] == s_o + c_o + 2^W * (cout[0]+..+cout[3])
// exactly, in 64-bit integers, at W = 20.
module tb_csa62;

  localparam int unsigned W = 20;

  logic [W-1:0] a, b, c, d, e, f, s_o, c_o;
  logic [3:0] cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  csa62 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint lhs, rhs;
    #1;
    lhs = longint'(a) + longint'(b) + longint'(c) + longint'(d) + longint'(e) + longint'(f)
        + longint'(cin[0]) + longint'(cin[1]) + longint'(cin[2]) + longint'(cin[3]);
    rhs = longint'(s_o) + longint'(c_o)
        + (longint'(cout[0]) + longint'(cout[1]) + longint'(cout[2]) + longint'(cout[3])) * (64'sd1 <<< W);
    checks++;
    if (lhs != rhs) begin
      failures++;
      if (failures < 10) $display("sum %0d, reduced %0d", lhs, rhs);
    end
  endtask

  initial begin
    {a, b, c, d, e, f} = '1; cin = '1; check();
    {a, b, c, d, e, f} = '0; cin = '0; check();
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      d = W'($urandom); e = W'($urandom); f = W'($urandom);
      cin = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
