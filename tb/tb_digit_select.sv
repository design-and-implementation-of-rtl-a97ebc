// Exhaustive check of the digit selection over all 2^16 pairs of 8-bit
// sum and carry estimates: g must equal their sum modulo 8 (3 integer and
// 5 fractional bits) and q must equal sign(g) * floor(|g| + 1/2), limited
// to -3..3, computed here in floating point.
module tb_digit_select;
  import cdiv_pkg::*;

  logic [7:0] ws_top, wc_top, g;
  digit_t q;
  int checks = 0, failures = 0;
  int n_dig [7];
  logic clk = 1'b0;

  digit_select dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gv, mag;
    int want;
    logic [7:0] gsum;
    foreach (n_dig[i]) n_dig[i] = 0;
    for (int i = 0; i < 65536; i++) begin
      {ws_top, wc_top} = 16'(i);
      #1;
      gsum = ws_top + wc_top;
      gv = real'(int'($signed(gsum))) / 32.0;
      mag = gv < 0 ? -gv : gv;
      want = int'($floor(mag + 0.5));
      if (want > 3) want = 3;
      if (gv < 0) want = -want;
      checks++;
      if (g != gsum || int'(q) != want) begin
        failures++;
        if (failures < 10) $display("g=%f: q=%0d want %0d", gv, q, want);
      end
      n_dig[int'(q) + 3]++;
    end
    foreach (n_dig[i]) $display("digit %0d: %0d", i - 3, n_dig[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
