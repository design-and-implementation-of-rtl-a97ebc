// Runs a real and an imaginary recurrence module, cross-connected as in
// the divider, from random initial residuals x (|x| <= 57/64) and random
// prescaled divisors y (|y^R - 1|, |y^I| < 0.045). After every step it
// checks, against a 64-bit integer model fed with the digits the modules
// chose,
//   w^R <- 4 w^R - q^R y^R + q^I y^I,   w^I <- 4 w^I - q^I y^R - q^R y^I
// (the carry-save pair must sum to the model modulo 2), that each digit
// rounds the shifted residual, |4w - q| <= 1/2 + 2^-4, and that
// |w| <= 57/64. Counts every digit value.
module tb_recurrence;
  import cdiv_pkg::*;

  localparam int unsigned N = 36;
  localparam int unsigned F = N - 1;
  localparam int unsigned STEPS = 20;

  logic clk = 1'b0;
  logic init_res = 1'b0, en_res = 1'b0;
  logic signed [N:0] y_re = '0, y_im = '0;
  digit_t q_re, q_im;
  logic [N-1:0] ws_re, wc_re, ws_im, wc_im;
  int checks = 0, failures = 0;
  int n_dig [7];

  recurrence #(.N(N), .IMAG(1'b0)) dut_re (
    .clk, .init_res, .en_res, .y_re, .y_im, .q_oth(q_im), .q(q_re), .ws(ws_re), .wc(wc_re));
  recurrence #(.N(N), .IMAG(1'b1)) dut_im (
    .clk, .init_res, .en_res, .y_re, .y_im, .q_oth(q_re), .q(q_im), .ws(ws_im), .wc(wc_im));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return ($itor($urandom) + $itor($urandom) / 4294967296.0) / 4294967296.0;
  endfunction

  function automatic longint fx(input real r);
    return longint'($floor(r * (2.0 ** F)));
  endfunction

  // carry-save pair modulo 2, as a signed integer in units of 2^-F
  function automatic longint cs(input logic [N-1:0] s, input logic [N-1:0] c);
    logic signed [N-1:0] w;
    w = s + c;
    return longint'(w);
  endfunction

  function automatic void chk_digit(input longint w, input digit_t q);
    real d;
    d = 4.0 * real'(w) / (2.0 ** F) - real'(int'(q));
    checks++;
    if (d > 0.5625 || d < -0.5625) begin
      failures++;
      $display("digit %0d does not round 4w = %f", q, 4.0 * real'(w) / (2.0 ** F));
    end
  endfunction

  task automatic run(input real xr, input real xi, input real yr, input real yi);
    longint wr, wi, yr_i, yi_i, nr, ni;
    yr_i = fx(yr); yi_i = fx(yi);
    wr = fx(xr); wi = fx(xi);
    @(negedge clk);
    y_re = (N+1)'(wr); y_im = (N+1)'(wi);   // x sits in the prescaler register
    init_res = 1'b1;
    @(negedge clk) init_res = 1'b0;
    y_re = (N+1)'(yr_i); y_im = (N+1)'(yi_i);
    for (int j = 0; j < STEPS; j++) begin
      #1;
      chk_digit(wr, q_re);
      chk_digit(wi, q_im);
      n_dig[int'(q_re) + 3]++;
      n_dig[int'(q_im) + 3]++;
      nr = 4 * wr - longint'(q_re) * yr_i + longint'(q_im) * yi_i;
      ni = 4 * wi - longint'(q_im) * yr_i - longint'(q_re) * yi_i;
      en_res = 1'b1;
      @(negedge clk) en_res = 1'b0;
      wr = nr; wi = ni;
      checks++;
      if (cs(ws_re, wc_re) != wr || cs(ws_im, wc_im) != wi) begin
        failures++;
        if (failures < 10) $display("step %0d: w = %0d %0d, expected %0d %0d", j,
                                    cs(ws_re, wc_re), cs(ws_im, wc_im), wr, wi);
      end
      checks++;
      if (wr > fx(57.0/64) || wr < -fx(57.0/64) || wi > fx(57.0/64) || wi < -fx(57.0/64)) begin
        failures++;
        $display("residual bound exceeded");
      end
    end
  endtask

  initial begin
    foreach (n_dig[i]) n_dig[i] = 0;
    run(0.85, -0.85, 1.0, 0.0);
    run(-0.85, 0.8, 0.96, 0.04);
    for (int i = 0; i < 1000; i++)
      run((2.0 * urand() - 1.0) * 0.89, (2.0 * urand() - 1.0) * 0.89,
          1.0 + (2.0 * urand() - 1.0) * 0.045, (2.0 * urand() - 1.0) * 0.045);
    foreach (n_dig[i]) begin
      $display("digit %0d: %0d", i - 3, n_dig[i]);
      checks++;
      if (n_dig[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
