// Radix-4 residual recurrence for one component of the complex residual.
//
//   real (IMAG=0):  w^R[j+1] = 4 w^R[j] - q^R y^R + q^I y^I
//   imag (IMAG=1):  w^I[j+1] = 4 w^I[j] - q^I y^R - q^R y^I
// Both have the form 4w + s1*y^R + s2*y^I, so one module serves both; the
// own digit q comes from this module's selection, the other digit q_oth
// from the partner module.
//
// The residual is kept in carry-save form, (ws, wc), N bits each, one
// integer and N-1 fractional bits, modulo 2 (|w| <= 57/64, so bits of
// weight 2 and above are never needed). The digit is chosen from the top
// 8 bits by digit_select, which also returns their non-redundant sum g.
// The next residual is formed in three parts:
//   positions 6..N-1  a [6:2] adder of 4ws, 4wc and the four MG vectors;
//                     the MG negation carries enter at its LSB;
//   positions 1..5    a [5:2]^4 adder of g_1..g_5 and the MG vectors,
//                     taking the four lateral carries of the [6:2] adder;
//   position 0        an XOR slice: parity of g_0, the MG bits of weight 1
//                     and three lateral carries; the fourth is c_0.
// Interface: y_re/y_im are the prescaler outputs (N+1 bits, N-1
// fractional); they hold x while init_res loads ws <= x, wc <= 0, and y
// during the iterations. en_res advances the residual one step per clock.
// q is combinational from the registers. Only the low N bits of y are
// used (arithmetic modulo 2), and of g only g_0..g_5 enter the residual.
// The optimised reduction and the carry-save format follow the published
// design; the port names and the IMAG parameter are this design's own.
module recurrence
  import cdiv_pkg::*;
#(
  parameter int unsigned N    = 36,
  parameter bit          IMAG = 1'b0
) (
  input  logic              clk,
  input  logic              init_res,
  input  logic              en_res,
  input  logic signed [N:0] y_re,
  input  logic signed [N:0] y_im,
  input  digit_t            q_oth,
  output digit_t            q,
  output logic [N-1:0]      ws,
  output logic [N-1:0]      wc
);

  localparam int unsigned WL = N - 6;  // width of the [6:2] part

  if (N < 10) begin : g_bad_n
    $error("recurrence: N must be at least 10");
  end

  logic [7:0]    g;
  digit_t        sig_a, sig_b;
  logic [N-1:0]  v1a, v2a, v1b, v2b;
  logic          m1a, m2a, m1b, m2b;
  logic [WL-1:0] ls, lc;
  logic [3:0]    lcout;
  logic [4:0]    hs, hc;
  logic [3:0]    hcout;
  logic          s0;
  logic [N-1:0]  ws_nxt, wc_nxt;

  digit_select u_sel (.ws_top(ws[N-1 -: 8]), .wc_top(wc[N-1 -: 8]), .g, .q);

  always_comb begin
    sig_a = -q;
    sig_b = IMAG ? -q_oth : q_oth;
  end

  mg #(.W(N)) u_mg_a (.sigma(sig_a), .y(y_re[N-1:0]), .v1(v1a), .v2(v2a), .m1(m1a), .m2(m2a));
  mg #(.W(N)) u_mg_b (.sigma(sig_b), .y(y_im[N-1:0]), .v1(v1b), .v2(v2b), .m1(m1b), .m2(m2b));

  csa62 #(.W(WL)) u_low (
    .a({ws[WL-3:0], 2'b00}), .b({wc[WL-3:0], 2'b00}),
    .c(v1a[WL-1:0]), .d(v2a[WL-1:0]), .e(v1b[WL-1:0]), .f(v2b[WL-1:0]),
    .cin({m2b, m1b, m2a, m1a}),
    .s_o(ls), .c_o(lc), .cout(lcout)
  );

  csa52x4 #(.W(5)) u_high (
    .g(g[4:0]),
    .c(v1a[N-2 -: 5]), .d(v2a[N-2 -: 5]), .e(v1b[N-2 -: 5]), .f(v2b[N-2 -: 5]),
    .cin(lcout), .s_o(hs), .c_o(hc), .cout(hcout)
  );

  always_comb begin
    s0 = g[5] ^ v1a[N-1] ^ v2a[N-1] ^ v1b[N-1] ^ v2b[N-1]
       ^ hcout[0] ^ hcout[1] ^ hcout[2];
    ws_nxt = {s0, hs, ls};
    wc_nxt = {hcout[3], hc, lc};
  end

  always_ff @(posedge clk) begin
    if (init_res) begin
      ws <= IMAG ? y_im[N-1:0] : y_re[N-1:0];
      wc <= '0;
    end else if (en_res) begin
      ws <= ws_nxt;
      wc <= wc_nxt;
    end
  end

endmodule
