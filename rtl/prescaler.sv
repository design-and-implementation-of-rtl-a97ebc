// Prescaling module: x = K*z, then y = K*d, with one shared complex multiplier.
//
// The operands are latched by en_inputs. The look-up block derives K from
// the latched divisor and en_pres stores it. sel_mul picks the multiplier
// operand (1: dividend z, 0: divisor d); the four real products form
//   P^R = A^R K^R - A^I K^I,   P^I = A^R K^I + A^I K^R,
// and en_sc loads P into the output registers, first x (which the
// recurrences copy into their residuals) and then y, which stays there
// for the iterations. The products are truncated to N-1 fractional bits;
// the 6 bits below and the sign-extension bits above are dropped.
// Clock enables make every path from the input registers a multi-cycle
// path: the controller holds sel_mul for several cycles before en_sc.
//
// Interface: operands N-bit two's complement, N-1 fractional bits
// (1/2 <= ||d||_inf < 1, ||z||_inf <= 57/256). p_re/p_im are (N+1)-bit,
// 2 integer + N-1 fractional bits, since |y^R| < 1 + eps_s.
// The register organisation and control signals follow the published
// scaling module; the truncation of products is this design's choice.
module prescaler
  import cdiv_pkg::*;
#(
  parameter int unsigned N = 36
) (
  input  logic                clk,
  input  logic                en_inputs,
  input  logic                en_pres,
  input  logic                sel_mul,
  input  logic                en_sc,
  input  logic signed [N-1:0] z_re,
  input  logic signed [N-1:0] z_im,
  input  logic signed [N-1:0] d_re,
  input  logic signed [N-1:0] d_im,
  output logic signed [N:0]   p_re,
  output logic signed [N:0]   p_im
);

  localparam int unsigned PW = N + K_W + 1;  // product-sum width

  logic signed [N-1:0]   zr_q, zi_q, dr_q, di_q;
  logic signed [K_W-1:0] k_re, k_im, kr_q, ki_q;
  logic signed [N-1:0]   a_re, a_im;
  logic signed [PW-1:0]  s_re, s_im;

  always_ff @(posedge clk) begin
    if (en_inputs) begin
      zr_q <= z_re;
      zi_q <= z_im;
      dr_q <= d_re;
      di_q <= d_im;
    end
    if (en_pres) begin
      kr_q <= k_re;
      ki_q <= k_im;
    end
    if (en_sc) begin
      p_re <= s_re[T_FRAC +: N+1];
      p_im <= s_im[T_FRAC +: N+1];
    end
  end

  prescale_lookup #(.N(N)) u_lookup (
    .clk, .d_re(dr_q), .d_im(di_q), .k_re, .k_im
  );

  always_comb begin
    a_re = sel_mul ? zr_q : dr_q;
    a_im = sel_mul ? zi_q : di_q;
    s_re = PW'(a_re) * PW'(kr_q) - PW'(a_im) * PW'(ki_q);
    s_im = PW'(a_re) * PW'(ki_q) + PW'(a_im) * PW'(kr_q);
  end

endmodule
