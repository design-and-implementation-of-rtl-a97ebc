// Checks the prescaling look-up against K = rnd(1/rnd(d, 6), 6) computed in
// floating point for each component magnitude, with K^R carrying the sign
// of rnd(d^R) and K^I the opposite sign of rnd(d^I). Divisors are random
// with 1/2 <= ||d||_inf < 1, plus directed values that round to +-1 in one
// or both components. Also checks ||K d - 1||_inf < 7/128, the prescaling
// error the radix-4 selection tolerates, and counts the look-up paths.
module tb_prescale_lookup;

  localparam int unsigned N = 36;
  localparam int unsigned F = N - 1;
  localparam real ULP = 1.0 / (2.0 ** F);

  logic clk = 1'b0;
  logic signed [N-1:0] d_re = '0, d_im = '0;
  logic signed [8:0] k_re, k_im;
  int checks = 0, failures = 0;
  int n_path [5];

  prescale_lookup #(.N(N)) dut (.*);

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

  function automatic real r6(input real v);
    return $floor(v * 64.0 + 0.5) / 64.0;
  endfunction

  task automatic check(input real dr, input real di);
    real rr, ri, a, b, m, kr, ki, er, ei, drq, diq;
    int mr, mi, ekr, eki;
    @(negedge clk);
    d_re = N'(longint'($floor(dr * (2.0 ** F))));
    d_im = N'(longint'($floor(di * (2.0 ** F))));
    @(negedge clk);
    drq = real'(longint'(d_re)) / (2.0 ** F);
    diq = real'(longint'(d_im)) / (2.0 ** F);
    rr = r6(drq); ri = r6(diq);
    a = rr < 0 ? -rr : rr;
    b = ri < 0 ? -ri : ri;
    m = a * a + b * b;
    mr = int'($floor(64.0 * a / m + 0.5));
    mi = int'($floor(64.0 * b / m + 0.5));
    ekr = rr < 0 ? -mr : mr;
    eki = ri < 0 ? mi : -mi;
    checks++;
    if (int'(k_re) != ekr || int'(k_im) != eki) begin
      failures++;
      $display("d=%f %f: K=%0d %0d, expected %0d %0d", drq, diq, k_re, k_im, ekr, eki);
    end
    kr = real'(int'(k_re)) / 64.0;
    ki = real'(int'(k_im)) / 64.0;
    er = kr * drq - ki * diq - 1.0;
    ei = ki * drq + kr * diq;
    checks++;
    if (er >= 7.0/128 || er <= -7.0/128 || ei >= 7.0/128 || ei <= -7.0/128) begin
      failures++;
      $display("d=%f %f: Kd - 1 = %f %f too large", drq, diq, er, ei);
    end
    if (dut.one_re && dut.one_im) n_path[4]++;
    else if (dut.one_re) n_path[2]++;
    else if (dut.one_im) n_path[3]++;
    else if (dut.swap) n_path[1]++;
    else n_path[0]++;
  endtask

  initial begin
    real major, minor, dr, di;
    foreach (n_path[i]) n_path[i] = 0;
    check(1.0 - ULP, 1.0 - ULP);
    check(-1.0, 1.0 - ULP);
    check(-1.0, -1.0);
    check(1.0 - ULP, -0.3);
    check(0.2, -1.0);
    check(0.5, 0.0);
    check(0.0, -0.5);
    check(0.5, 0.5);
    for (int i = 0; i < 3000; i++) begin
      major = 0.5 + 0.5 * urand();
      minor = urand();
      if ($urandom_range(1, 0) == 1) begin dr = major; di = minor; end
      else begin dr = minor; di = major; end
      if ($urandom_range(1, 0) == 1) dr = -dr;
      if ($urandom_range(1, 0) == 1) di = -di;
      if (dr >= 1.0) dr = 1.0 - ULP;
      if (di >= 1.0) di = 1.0 - ULP;
      check(dr, di);
    end
    $display("paths: table %0d, table swapped %0d, ROM_s (re) %0d, ROM_s (im) %0d, both +-1 %0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_path[4]);
    foreach (n_path[i]) begin
      checks++;
      if (n_path[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
