// Checks the digit-multiple generator for every digit -3..3 and random y:
//   v1 + v2 + m1 + m2 == sigma * y  (mod 2^W),
// and that v1 carries the odd part (|s1| = sigma mod 2) while v2 is
// always an even multiple (its LSB equals m2, since ~(2y) ends in 1).
module tb_mg;
  import cdiv_pkg::*;

  localparam int unsigned W = 24;

  digit_t sigma;
  logic [W-1:0] y, v1, v2;
  logic m1, m2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mask, got, want;
    mask = (64'sd1 <<< W) - 1;
    for (int i = 0; i < 5000; i++) begin
      y = W'($urandom);
      for (int s = -3; s <= 3; s++) begin
        sigma = 3'(s);
        #1;
        got  = (longint'(v1) + longint'(v2) + longint'(m1) + longint'(m2)) & mask;
        want = (longint'(s) * longint'(y)) & mask;
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("sigma %0d y %h: got %h want %h", s, y, got, want);
        end
        checks++;
        if (v2[0] != m2 || ((s % 2 == 0) && (v1 != '0 || m1))) begin
          failures++;
          if (failures < 10) $display("sigma %0d: wrong decomposition", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
