// Checks the controller cycle by cycle against the operation schedule:
// counting clocks after the start edge, en_pres in cycle 3, sel_mul in
// cycles 4..7, en_sc in cycles 7 and 11, init_res in cycle 8, iterations
// (iter, en_res) in cycles 12..11+ITERS and done in cycle 12+ITERS, i.e.
// 3 + 2*4 + ITERS clocks after the start edge. Also checks that start is
// ignored while busy and accepted again in the done cycle.
module tb_cdiv_ctrl;

  localparam int unsigned ITERS = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic en_inputs, en_pres, sel_mul, en_sc, init_res, en_res, iter, busy, done;
  int checks = 0, failures = 0;

  cdiv_ctrl #(.ITERS(ITERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expected(input int c);
    // {en_pres, sel_mul, en_sc, init_res, en_res, iter, busy, done}
    logic [7:0] e;
    e = '0;
    e[7] = (c == 3);
    e[6] = (c >= 4 && c <= 7);
    e[5] = (c == 7 || c == 11);
    e[4] = (c == 8);
    e[3] = (c == 8) || (c >= 12 && c <= 11 + ITERS);
    e[2] = (c >= 12 && c <= 11 + ITERS);
    e[1] = (c >= 1 && c <= 11 + ITERS);
    e[0] = (c == 12 + ITERS);
    return e;
  endfunction

  task automatic op(input bit poke_busy, input bit chain);
    logic [7:0] got;
    #1 checks++;
    if (!en_inputs) begin failures++; $display("start not accepted"); end
    @(posedge clk);
    #1 start = 1'b0;
    for (int c = 1; c <= 12 + ITERS; c++) begin
      got = {en_pres, sel_mul, en_sc, init_res, en_res, iter, busy, done};
      checks++;
      if (got !== expected(c)) begin
        failures++;
        $display("cycle %0d: controls %b, expected %b", c, got, expected(c));
      end
      if (poke_busy && c == 5) start = 1'b1;    // must be ignored
      if (c == 6) start = 1'b0;
      if (c == 5 || c == 6) begin
        checks++;
        if (en_inputs) begin failures++; $display("inputs latched while busy"); end
      end
      if (chain && c == 12 + ITERS) start = 1'b1;
      if (c < 12 + ITERS) begin
        @(posedge clk);
        #1;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 start = 1'b1;
    op(1'b1, 1'b1);   // second operation starts in the done cycle
    op(1'b0, 1'b0);
    @(posedge clk);
    #1 checks++;
    if (busy || done) begin failures++; $display("not idle after the operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
