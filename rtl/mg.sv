// Digit-multiple generator (MG): sigma * y for a digit sigma in {-3..3}.
//
// The digit is split as sigma = 2*s2 + s1 with s1, s2 in {-1, 0, 1}
// (3 = 2+1, 2 = 2+0, 1 = 0+1 and symmetrically). The outputs are the two
// vectors s1*y and 2*s2*y as seen by a carry-save adder: a negative
// multiple is the bit-wise inverse of the positive one, and the +1 that
// completes the two's complement negation is returned as the carry-in
// m1 (for v1) or m2 (for v2), to be added at the least significant position.
// All arithmetic is modulo 2^W: v1 + v2 + m1 + m2 == sigma * y (mod 2^W).
// Combinational. The decomposition and the inversion with carry-in follow
// the published recurrence; the digit encoding is this design's choice.
module mg
  import cdiv_pkg::*;
#(
  parameter int unsigned W = 36
) (
  input  digit_t       sigma,
  input  logic [W-1:0] y,
  output logic [W-1:0] v1,   // s1 * y
  output logic [W-1:0] v2,   // 2 * s2 * y
  output logic         m1,
  output logic         m2
);

  logic [W-1:0] y2;
  logic [1:0]   s1_sel, s2_sel;  // {nonzero, negative}

  always_comb begin
    y2 = y << 1;
    unique case (sigma)
      3'sd3:   begin s2_sel = 2'b10; s1_sel = 2'b10; end
      3'sd2:   begin s2_sel = 2'b10; s1_sel = 2'b00; end
      3'sd1:   begin s2_sel = 2'b00; s1_sel = 2'b10; end
      -3'sd1:  begin s2_sel = 2'b00; s1_sel = 2'b11; end
      -3'sd2:  begin s2_sel = 2'b11; s1_sel = 2'b00; end
      -3'sd3:  begin s2_sel = 2'b11; s1_sel = 2'b11; end
      default: begin s2_sel = 2'b00; s1_sel = 2'b00; end
    endcase
    v1 = !s1_sel[1] ? '0 : (s1_sel[0] ? ~y  : y);
    v2 = !s2_sel[1] ? '0 : (s2_sel[0] ? ~y2 : y2);
    m1 = s1_sel[1] & s1_sel[0];
    m2 = s2_sel[1] & s2_sel[0];
  end

endmodule
