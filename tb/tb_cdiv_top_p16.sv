// End-to-end test of the complex divider at the 16-bit design point
// (16-bit operands, 8 radix-4 iterations, 3 + 8 + 8 = 19 clocks per
// operation). Apart from the size it is the same test as the 36-bit one.
//
// Random operands inside the documented ranges (1/2 <= ||d||_inf < 1,
// ||z||_inf <= 57/256) plus directed divisors that exercise every path of
// the reciprocal look-up: the folded table with and without the real/imag
// swap, ROM_s for a component that rounds to +-1, the constant for both
// components +-1, and all four sign quadrants. Two directed dividends with
// d ~= 1 exceed 57/256 while K*z stays within the residual bound 57/64;
// only these reach the digits +-3. For every operation it
// checks
//   - the latency from the start edge to done (3 + 2*4 + ITERS clocks),
//   - ||K d - 1||_inf < 7/128 at the end of prescaling (convergence bound),
//   - |w| <= 57/64 for both residuals after every iteration,
//   - |q - z/d| <= 3 * 4^-ITERS + 8 * 2^-(N-1) per component, against a
//     floating-point quotient computed here.
// It counts how often each mechanism happened (look-up paths, every digit
// value in each recurrence) and fails if one never did.
module tb_cdiv_top_p16;
  import cdiv_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned ITERS = 8;
  localparam int unsigned F     = N - 1;
  localparam int unsigned NRAND = 400;
  localparam real         ULP   = 1.0 / (2.0 ** F);
  // recurrence error (|w| 4^-ITERS / |y|) plus truncation of x and y
  localparam real         TOL   = 3.0 / (4.0 ** ITERS) + 8.0 * ULP;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [N-1:0] z_re = '0, z_im = '0, d_re = '0, d_im = '0;
  logic busy, done;
  logic signed [2*ITERS:0] q_re, q_im;

  int checks = 0, failures = 0;
  int n_swap = 0, n_noswap = 0, n_roms_re = 0, n_roms_im = 0, n_both = 0;
  int n_quad [4];
  int n_dig_re [7];
  int n_dig_im [7];

  cdiv_top #(.N(N), .ITERS(ITERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sc(input logic signed [N-1:0] v);
    return real'(longint'(v)) / (2.0 ** F);
  endfunction

  function automatic logic signed [N-1:0] to_fix(input real r);
    return N'(longint'($floor(r * (2.0 ** F))));
  endfunction

  function automatic real urand();  // uniform [0,1)
    return ($itor($urandom) + $itor($urandom) / 4294967296.0) / 4294967296.0;
  endfunction

  // residual value (ws + wc) mod 2 read as a number in [-1, 1)
  function automatic real resid(input logic [N-1:0] s, input logic [N-1:0] c);
    logic signed [N-1:0] w;
    w = s + c;
    return real'(longint'(w)) / (2.0 ** F);
  endfunction

  task automatic divide(input real zr, input real zi, input real dr, input real di);
    int cyc;
    real qr, qi, den, er, ei, yr, yi;
    @(negedge clk);
    z_re = to_fix(zr); z_im = to_fix(zi); d_re = to_fix(dr); d_im = to_fix(di);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
      if (dut.iter) begin
        // the residuals in the registers now; check the bound
        checks++;
        if ((resid(dut.u_rec_re.ws, dut.u_rec_re.wc) > 57.0/64 || resid(dut.u_rec_re.ws, dut.u_rec_re.wc) < -57.0/64) ||
            (resid(dut.u_rec_im.ws, dut.u_rec_im.wc) > 57.0/64 || resid(dut.u_rec_im.ws, dut.u_rec_im.wc) < -57.0/64)) begin
          failures++;
          $display("residual out of bound: %f %f", resid(dut.u_rec_re.ws, dut.u_rec_re.wc), resid(dut.u_rec_im.ws, dut.u_rec_im.wc));
        end
        n_dig_re[int'(dut.qd_re) + 3]++;
        n_dig_im[int'(dut.qd_im) + 3]++;
        if (cyc == 12) begin
          // y = K d has been stored: convergence condition
          yr = real'(longint'(dut.p_re)) / (2.0 ** F);
          yi = real'(longint'(dut.p_im)) / (2.0 ** F);
          checks++;
          if (yr - 1.0 >= 7.0/128 || 1.0 - yr >= 7.0/128 || yi >= 7.0/128 || -yi >= 7.0/128) begin
            failures++;
            $display("prescaling error too large: y = %f %f i (d = %f %f i)", yr, yi, dr, di);
          end
        end
      end
    end while (!done && cyc < 100);
    checks++;
    if (cyc != int'(LOOKUP_CYC + 2 * SCALE_CYC + ITERS)) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, LOOKUP_CYC + 2 * SCALE_CYC + ITERS);
    end
    zr = sc(z_re); zi = sc(z_im); dr = sc(d_re); di = sc(d_im);
    den = dr * dr + di * di;
    qr = (zr * dr + zi * di) / den;
    qi = (zi * dr - zr * di) / den;
    er = real'(longint'(q_re)) / (4.0 ** ITERS) - qr;
    ei = real'(longint'(q_im)) / (4.0 ** ITERS) - qi;
    checks++;
    if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
      failures++;
      $display("quotient error: z=%f%f i d=%f%f i err=%e %e", zr, zi, dr, di, er, ei);
    end
  endtask

  // count the look-up path taken for the current divisor
  always @(posedge clk) begin
    if (dut.en_pres) begin
      if (dut.u_pre.u_lookup.one_re && dut.u_pre.u_lookup.one_im) n_both++;
      else if (dut.u_pre.u_lookup.one_re) n_roms_re++;
      else if (dut.u_pre.u_lookup.one_im) n_roms_im++;
      else if (dut.u_pre.u_lookup.swap) n_swap++;
      else n_noswap++;
      n_quad[{dut.u_pre.u_lookup.neg_re, dut.u_pre.u_lookup.neg_im}]++;
    end
  end

  // a start while busy would be ignored; the test never issues one
  always @(posedge clk) begin
    assert (!(start && busy)) else $error("start issued while busy");
  end

  initial begin
    real major, minor, zr, zi, dr, di;
    foreach (n_quad[i]) n_quad[i] = 0;
    foreach (n_dig_re[i]) begin n_dig_re[i] = 0; n_dig_im[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // directed divisors
    divide( 0.2,   0.1,   0.75,  0.0);
    divide(-0.2,   0.2,   0.0,  -0.6);
    divide( 0.22, -0.22,  1.0 - ULP,  1.0 - ULP);   // both round to 1
    divide( 0.1,   0.15, -1.0,   1.0 - ULP);              // -1 and 1
    divide(-0.21,  0.05, -1.0,  -1.0);                          // -1 and -1
    divide( 0.13, -0.07,  0.999, -0.3);                         // real rounds to 1
    divide( 0.02,  0.2,  -0.25, -0.9999);                       // imag rounds to 1
    divide( 0.22,  0.22,  0.5,   0.5);
    divide(-0.22, -0.22,  0.5,  -0.999);
    divide( 57.0/256, -57.0/256, 0.5, 0.0);                     // largest quotient
    // ||z|| beyond 57/256 but ||K z|| < 57/64 (K ~= 1): the residual bound
    // still holds and the first digits are +-3
    divide( 0.7,  -0.7,   0.99,  0.0);
    divide(-0.8,   0.75,  0.97,  0.05);

    for (int i = 0; i < NRAND; i++) begin
      major   = 0.5 + 0.5 * urand();
      minor = urand();
      if ($urandom_range(3, 0) == 0) minor = minor * 0.1;
      if ($urandom_range(1, 0) == 1) begin dr = major; di = minor; end
      else              begin dr = minor; di = major; end
      if ($urandom_range(1, 0) == 1) dr = -dr;
      if ($urandom_range(1, 0) == 1) di = -di;
      if (dr >= 1.0) dr = 1.0 - ULP;
      if (di >= 1.0) di = 1.0 - ULP;
      zr = (2.0 * urand() - 1.0) * 57.0 / 256;
      zi = (2.0 * urand() - 1.0) * 57.0 / 256;
      divide(zr, zi, dr, di);
    end

    $display("lookup paths: no-swap %0d swap %0d ROMs(re=1) %0d ROMs(im=1) %0d both %0d",
             n_noswap, n_swap, n_roms_re, n_roms_im, n_both);
    $display("sign quadrants: %0d %0d %0d %0d", n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    checks += 5;
    if (n_noswap == 0 || n_swap == 0 || n_roms_re == 0 || n_roms_im == 0 || n_both == 0) begin
      failures++;
      $display("a look-up path was never taken");
    end
    foreach (n_quad[i]) begin
      checks++;
      if (n_quad[i] == 0) begin failures++; $display("sign quadrant %0d never seen", i); end
    end
    for (int v = 0; v < 7; v++) begin
      $display("digit %0d: real %0d imag %0d", v - 3, n_dig_re[v], n_dig_im[v]);
      checks++;
      if (n_dig_re[v] == 0 || n_dig_im[v] == 0) begin
        failures++;
        $display("digit %0d never selected", v - 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
