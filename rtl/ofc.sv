// On-the-fly converter: radix-4 signed digits to a two's complement fraction.
//
// Two registers are kept, Q = sum q_i 4^(j-i) and QM = Q - 1 (in units of
// the last digit). Appending digit q in {-3..3}:
//   Q  <= q >= 0 ? {Q, q}      : {QM, 4 + q}
//   QM <= q >  0 ? {Q, q - 1}  : {QM, 3 + q}
// where the appended 2-bit digit is q mod 4, resp. (q - 1) mod 4,
// so no carry ever propagates. After ITERS digits, q_o/4^ITERS is the
// quotient component 0.q1 q2 .. q_ITERS, one sign bit and 2*ITERS
// fractional bits.
// Interface: init clears Q to 0 and QM to -1; en appends digit. Results
// change one clock after en. The conversion rule is the standard one the
// design relies on; the register form is this design's own.
module ofc
  import cdiv_pkg::*;
#(
  parameter int unsigned ITERS = 16
) (
  input  logic                     clk,
  input  logic                     init,
  input  logic                     en,
  input  digit_t                   digit,
  output logic signed [2*ITERS:0]  q_o
);

  localparam int unsigned W = 2 * ITERS + 1;

  logic [W-1:0] qm;
  logic [1:0]   dig_lo, dig_m1_lo;  // q mod 4 and (q - 1) mod 4

  always_comb begin
    dig_lo    = digit[1:0];
    dig_m1_lo = 2'(digit - 3'sd1);
  end

  always_ff @(posedge clk) begin
    if (init) begin
      q_o <= '0;
      qm  <= '1;
    end else if (en) begin
      q_o <= {(digit >= 0) ? q_o[W-3:0] : qm[W-3:0], dig_lo};
      qm  <= {(digit > 0)  ? q_o[W-3:0] : qm[W-3:0], dig_m1_lo};
    end
  end

endmodule
