// Drives the prescaling module through the control sequence of one
// operation (latch operands, store K, scale z, scale d) and checks that the
// output registers hold x = K z and then y = K d, truncated to N-1
// fractional bits, with K taken from an independent floating-point model
// of the look-up. Also checks that x is not disturbed while sel_mul is
// switched without en_sc.
module tb_prescaler;

  localparam int unsigned N = 36;
  localparam int unsigned F = N - 1;

  logic clk = 1'b0;
  logic en_inputs = 1'b0, en_pres = 1'b0, sel_mul = 1'b0, en_sc = 1'b0;
  logic signed [N-1:0] z_re = '0, z_im = '0, d_re = '0, d_im = '0;
  logic signed [N:0] p_re, p_im;
  int checks = 0, failures = 0;

  prescaler #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return ($itor($urandom) + $itor($urandom) / 4294967296.0) / 4294967296.0;
  endfunction

  function automatic logic signed [N-1:0] fx(input real r);
    return N'(longint'($floor(r * (2.0 ** F))));
  endfunction

  // K in units of 2^-6 from the rounded divisor
  task automatic kmodel(input longint dr, input longint di, output longint kr, output longint ki);
    real rr, ri, a, b, m;
    longint mr, mi;
    rr = $floor(real'(dr) / (2.0 ** F) * 64.0 + 0.5) / 64.0;
    ri = $floor(real'(di) / (2.0 ** F) * 64.0 + 0.5) / 64.0;
    a = rr < 0 ? -rr : rr;
    b = ri < 0 ? -ri : ri;
    m = a * a + b * b;
    mr = longint'($floor(64.0 * a / m + 0.5));
    mi = longint'($floor(64.0 * b / m + 0.5));
    kr = rr < 0 ? -mr : mr;
    ki = ri < 0 ? mi : -mi;
  endtask

  task automatic op(input real zr, input real zi, input real dr, input real di);
    longint kr, ki, xr, xi, yr, yi;
    @(negedge clk);
    z_re = fx(zr); z_im = fx(zi); d_re = fx(dr); d_im = fx(di);
    en_inputs = 1'b1;
    @(negedge clk) en_inputs = 1'b0;
    z_re = '0; z_im = '0; d_re = '0; d_im = '0;   // inputs are held inside
    repeat (2) @(negedge clk);
    en_pres = 1'b1;
    @(negedge clk) en_pres = 1'b0;
    sel_mul = 1'b1;
    repeat (3) @(negedge clk);
    en_sc = 1'b1;
    @(negedge clk) en_sc = 1'b0;
    sel_mul = 1'b0;
    kmodel(longint'(fx(dr)), longint'(fx(di)), kr, ki);
    xr = (kr * longint'(fx(zr)) - ki * longint'(fx(zi))) >>> 6;
    xi = (ki * longint'(fx(zr)) + kr * longint'(fx(zi))) >>> 6;
    yr = (kr * longint'(fx(dr)) - ki * longint'(fx(di))) >>> 6;
    yi = (ki * longint'(fx(dr)) + kr * longint'(fx(di))) >>> 6;
    checks++;
    if (longint'(p_re) != xr || longint'(p_im) != xi) begin
      failures++;
      $display("x = %0d %0d, expected %0d %0d", p_re, p_im, xr, xi);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (longint'(p_re) != xr || longint'(p_im) != xi) begin
      failures++;
      $display("x changed without en_sc");
    end
    en_sc = 1'b1;
    @(negedge clk) en_sc = 1'b0;
    checks++;
    if (longint'(p_re) != yr || longint'(p_im) != yi) begin
      failures++;
      $display("y = %0d %0d, expected %0d %0d", p_re, p_im, yr, yi);
    end
  endtask

  initial begin
    real major, minor, dr, di;
    op(0.2, -0.1, 0.75, 0.25);
    op(-0.22, 0.22, -1.0, 0.6);
    for (int i = 0; i < 500; i++) begin
      major = 0.5 + 0.49 * urand();
      minor = 0.99 * urand();
      if ($urandom_range(1, 0) == 1) begin dr = major; di = minor; end
      else begin dr = minor; di = major; end
      if ($urandom_range(1, 0) == 1) dr = -dr;
      if ($urandom_range(1, 0) == 1) di = -di;
      op((2.0 * urand() - 1.0) * 57.0 / 256, (2.0 * urand() - 1.0) * 57.0 / 256, dr, di);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
