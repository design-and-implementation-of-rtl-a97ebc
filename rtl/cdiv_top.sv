// Radix-4 complex divider with operand prescaling: q = z / d.
//
// The divisor d is first scaled by K ~= 1/d, taken from a reciprocal table
// addressed by a 6-bit estimate of d, so that y = K*d lies within eps_s of
// 1 and x = K*z. The complex recurrence w[j+1] = 4w[j] - q_{j+1} y then
// splits into a real and an imaginary recurrence whose digits are chosen
// independently by rounding the shifted residuals, because y^I ~= 0 and
// y^R ~= 1. Each produces one radix-4 digit in {-3..3} per clock; the
// digits cross over to the partner recurrence and feed an on-the-fly
// converter each.
//
// Interface: z_re, z_im, d_re, d_im are N-bit two's complement with N-1
// fractional bits, required to satisfy 1/2 <= max(|d_re|,|d_im|) < 1 and
// max(|z_re|,|z_im|) <= 57/256. start (in idle) latches them; done rises
// LOOKUP_CYC + 2*SCALE_CYC + ITERS = 27 clocks later and is high for one
// cycle; q_re, q_im (sign + 2*ITERS fractional bits) hold the quotient
// until the next start. |q - z/d| is about 4^-ITERS per component.
// Defaults N = 36 and ITERS = 16 are the published 36-bit design point;
// the port protocol (start/busy/done) is this design's own.
module cdiv_top
  import cdiv_pkg::*;
#(
  parameter int unsigned N     = 36,
  parameter int unsigned ITERS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [N-1:0]     z_re,
  input  logic signed [N-1:0]     z_im,
  input  logic signed [N-1:0]     d_re,
  input  logic signed [N-1:0]     d_im,
  output logic                    busy,
  output logic                    done,
  output logic signed [2*ITERS:0] q_re,
  output logic signed [2*ITERS:0] q_im
);

  logic en_inputs, en_pres, sel_mul, en_sc, init_res, en_res, iter;
  logic signed [N:0] p_re, p_im;
  digit_t qd_re, qd_im;

  cdiv_ctrl #(.ITERS(ITERS)) u_ctrl (
    .clk, .rst_n, .start, .en_inputs, .en_pres, .sel_mul, .en_sc,
    .init_res, .en_res, .iter, .busy, .done
  );

  prescaler #(.N(N)) u_pre (
    .clk, .en_inputs, .en_pres, .sel_mul, .en_sc,
    .z_re, .z_im, .d_re, .d_im, .p_re, .p_im
  );

  recurrence #(.N(N), .IMAG(1'b0)) u_rec_re (
    .clk, .init_res, .en_res, .y_re(p_re), .y_im(p_im),
    .q_oth(qd_im), .q(qd_re), .ws(), .wc()
  );

  recurrence #(.N(N), .IMAG(1'b1)) u_rec_im (
    .clk, .init_res, .en_res, .y_re(p_re), .y_im(p_im),
    .q_oth(qd_re), .q(qd_im), .ws(), .wc()
  );

  ofc #(.ITERS(ITERS)) u_ofc_re (.clk, .init(init_res), .en(iter), .digit(qd_re), .q_o(q_re));
  ofc #(.ITERS(ITERS)) u_ofc_im (.clk, .init(init_res), .en(iter), .digit(qd_im), .q_o(q_im));

endmodule
