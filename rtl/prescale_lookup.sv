// Prescaling look-up: K ~= 1/d from a short estimate of the divisor.
//
// Each divisor component is rounded to 6 fractional bits, rnd(d, 6), and
// its magnitude taken (ABS). With 1/2 <= ||d||_inf < 1 at least one of the
// magnitudes has its 2^-1 bit set; that component becomes the "large" one
// a and the table is addressed by {a2..a6, b1..b6}, 11 bits instead of 12.
// If the real magnitude is the small one the two halves of the ROM word are
// crossed (real and imaginary swapped). A magnitude that rounds to exactly
// 1 selects ROM_s, addressed by the other magnitude; both equal to 1 gives
// the constant 1/2 for both magnitudes. Signs are applied at the end (NEG):
// K = conj(d)/|d|^2, so K^R takes the sign of rnd(d^R) and K^I the opposite
// sign of rnd(d^I).
//
// Interface: d_re/d_im are N-bit two's complement, N-1 fractional bits.
// k_re/k_im are 9-bit two's complement, 6 fractional bits.
// Timing: the ROMs read synchronously, so k is valid one clock after d
// settles; the caller holds d stable (it sits in the input registers) and
// samples k after the look-up cycles.
// Structure, widths (8, 6, 5, 11, 16, 9 bits) and the special cases follow
// the published look-up scheme. The sign rule is derived from 1/d rather
// than from the swap-based negation rule, which only covers the first
// quadrant.
module prescale_lookup
  import cdiv_pkg::*;
#(
  parameter int unsigned N = 36
) (
  input  logic                  clk,
  input  logic signed [N-1:0]   d_re,
  input  logic signed [N-1:0]   d_im,
  output logic signed [K_W-1:0] k_re,
  output logic signed [K_W-1:0] k_im
);

  localparam int unsigned F = N - 1;  // fractional bits of d

  // rnd(., 6): add half an ulp at 2^-7, keep 2 integer + 6 fractional bits.
  function automatic logic [7:0] rnd6(input logic signed [N-1:0] v);
    logic [N:0] ext;
    ext = {v[N-1], v} + ((N+1)'(1) << (F - 7));
    return ext[N -: 8];
  endfunction

  // ABS of an 8-bit two's complement number in [-1, 1]: 7 bits a0.a1..a6.
  function automatic logic [6:0] abs8(input logic [7:0] v);
    logic [7:0] m;
    m = v[7] ? 8'(-v) : v;
    return m[6:0];
  endfunction

  logic [7:0] kap_re, kap_im;     // kappa_{-1} kappa_0 . kappa_1..kappa_6
  logic [6:0] al_re, al_im;       // alpha_0 . alpha_1..alpha_6
  logic       one_re, one_im;     // |rnd| == 1
  logic       swap;               // imaginary magnitude used as the large one
  logic [10:0] rom_addr;
  logic [5:0]  roms_addr;
  logic [15:0] rom_q, roms_q;

  always_comb begin
    kap_re   = rnd6(d_re);
    kap_im   = rnd6(d_im);
    al_re    = abs8(kap_re);
    al_im    = abs8(kap_im);
    one_re   = al_re[6];
    one_im   = al_im[6];
    swap     = ~al_re[5];
    rom_addr  = al_re[5] ? {al_re[4:0], al_im[5:0]} : {al_im[4:0], al_re[5:0]};
    roms_addr = one_re ? al_im[5:0] : al_re[5:0];
  end

  recip_rom #(.SPECIAL(1'b0)) u_rom  (.clk, .addr(rom_addr),  .data(rom_q));
  recip_rom #(.SPECIAL(1'b1)) u_roms (.clk, .addr(roms_addr), .data(roms_q));

  logic [KMAG_W-1:0] u_re, u_im;  // magnitudes U^R, U^I
  logic              neg_re, neg_im;

  localparam logic [KMAG_W-1:0] HALF = KMAG_W'(1) << (T_FRAC - 1);

  always_comb begin
    if (one_re && one_im) begin
      u_re = HALF;
      u_im = HALF;
    end else if (one_re) begin
      u_re = roms_q[15:8];
      u_im = roms_q[7:0];
    end else if (one_im) begin
      u_re = roms_q[7:0];
      u_im = roms_q[15:8];
    end else if (swap) begin
      u_re = rom_q[7:0];
      u_im = rom_q[15:8];
    end else begin
      u_re = rom_q[15:8];
      u_im = rom_q[7:0];
    end
    neg_re = kap_re[7];
    neg_im = ~kap_im[7];
    k_re = neg_re ? -$signed({1'b0, u_re}) : $signed({1'b0, u_re});
    k_im = neg_im ? -$signed({1'b0, u_im}) : $signed({1'b0, u_im});
  end

endmodule
