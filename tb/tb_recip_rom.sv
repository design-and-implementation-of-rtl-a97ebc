// Checks every word of the main reciprocal ROM (11 address bits) and of
// ROM_s (6 address bits) against a floating-point reference:
//   hi = round(64 * a / (a^2 + b^2)),  lo = round(64 * b / (a^2 + b^2)),
// with a = 0.1 a2..a6, b = 0.b1..b6 (main) or a = 1, b = 0.b1..b6 (ROM_s),
// and the one-cycle read latency.
module tb_recip_rom;

  logic clk = 1'b0;
  logic [10:0] addr = '0;
  logic [5:0]  addr_s = '0;
  logic [15:0] data, data_s;
  int checks = 0, failures = 0;

  recip_rom #(.SPECIAL(1'b0)) dut   (.clk, .addr(addr),   .data(data));
  recip_rom #(.SPECIAL(1'b1)) dut_s (.clk, .addr(addr_s), .data(data_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_word(input real a, input real b);
    real m;
    int hi, lo;
    m  = a * a + b * b;
    hi = int'($floor(64.0 * a / m + 0.5));
    lo = int'($floor(64.0 * b / m + 0.5));
    return {hi[7:0], lo[7:0]};
  endfunction

  initial begin
    logic [15:0] exp_w;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk) addr = 11'(i);
      addr_s = 6'(i % 64);
      @(negedge clk);
      exp_w = ref_word((32.0 + (i / 64)) / 64.0, (i % 64) / 64.0);
      checks++;
      if (data !== exp_w) begin
        failures++;
        if (failures < 10) $display("ROM[%0d] = %h, expected %h", i, data, exp_w);
      end
      if (i < 64) begin
        exp_w = ref_word(1.0, i / 64.0);
        checks++;
        if (data_s !== exp_w) begin
          failures++;
          $display("ROM_s[%0d] = %h, expected %h", i, data_s, exp_w);
        end
      end
    end
    // read latency: data follows the address one clock later
    @(negedge clk) addr = 11'd0;
    @(negedge clk) addr = 11'd2047;
    #1 checks++;
    if (data !== ref_word(0.5, 0.0)) begin failures++; $display("latency check failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
