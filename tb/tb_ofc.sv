// Feeds random digit strings (-3..3) to the on-the-fly converter and checks
// after every digit that Q equals sum q_i 4^(j-i), computed here in 64-bit
// integers, and that QM stays equal to Q - 1. Includes all-negative and
// all-positive strings.
module tb_ofc;
  import cdiv_pkg::*;

  localparam int unsigned ITERS = 16;

  logic clk = 1'b0;
  logic init = 1'b0, en = 1'b0;
  digit_t digit = '0;
  logic signed [2*ITERS:0] q_o;
  int checks = 0, failures = 0;

  ofc #(.ITERS(ITERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode);
    longint acc;
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    acc = 0;
    for (int j = 0; j < ITERS; j++) begin
      case (mode)
        0: digit = 3'(int'($urandom_range(6, 0)) - 3);
        1: digit = -3'sd3;
        default: digit = 3'sd3;
      endcase
      en = 1'b1;
      acc = acc * 4 + longint'(digit);
      @(negedge clk) en = 1'b0;
      checks++;
      if (longint'(q_o) != acc || longint'($signed(dut.qm)) != acc - 1) begin
        failures++;
        if (failures < 10) $display("after %0d digits Q=%0d QM=%0d, expected %0d", j + 1, q_o, $signed(dut.qm), acc);
      end
    end
  endtask

  initial begin
    run(1);
    run(2);
    repeat (500) run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
