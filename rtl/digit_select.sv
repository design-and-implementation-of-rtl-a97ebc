// Quotient-digit selection: short CPA plus rounding table.
//
// The top 8 bits of the carry-save residual, C0.C1..C7 and S0.S1..S7, read
// as the shifted residual 4w (3 integer, 5 fractional bits) are added
// modulo 8 into g = g_{-2} g_{-1} g_0 . g_1 .. g_5. Truncating both
// vectors to 2^-5 gives an estimate within 2^-4 of 4w. The digit is g
// rounded to the nearest integer, q = sign(g) * floor(|g| + 1/2), read from
// a table of the four bits g_{-2} g_{-1} g_0 g_1 and g_z = g_2|g_3|g_4|g_5.
// Two table rows that a bounded residual cannot reach (|g| >= 3.5) are
// saturated to +-3.
// Interface: ws_top, wc_top are bits 0..7 of the residual vectors (MSB
// first). g is also returned: its bits g_0..g_5 feed the next residual.
// Combinational. The CPA width and the table inputs are as published;
// rows missing from the published table were filled in from the rounding
// rule above.
module digit_select
  import cdiv_pkg::*;
(
  input  logic [7:0] ws_top,
  input  logic [7:0] wc_top,
  output logic [7:0] g,
  output digit_t     q
);

  logic gz;

  always_comb begin
    g  = ws_top + wc_top;
    gz = |g[3:0];
    unique casez ({g[7:4], gz})
      5'b0000_?: q = 3'sd0;
      5'b0001_?: q = 3'sd1;
      5'b0010_?: q = 3'sd1;
      5'b0011_?: q = 3'sd2;
      5'b0100_?: q = 3'sd2;
      5'b0101_?: q = 3'sd3;
      5'b0110_?: q = 3'sd3;
      5'b0111_?: q = 3'sd3;   // g >= 3.5, saturated
      5'b1000_?: q = -3'sd3;  // g < -3.5, saturated
      5'b1001_0: q = -3'sd3;  // g = -3.5, saturated
      5'b1001_1: q = -3'sd3;
      5'b1010_?: q = -3'sd3;
      5'b1011_0: q = -3'sd3;
      5'b1011_1: q = -3'sd2;
      5'b1100_?: q = -3'sd2;
      5'b1101_0: q = -3'sd2;
      5'b1101_1: q = -3'sd1;
      5'b1110_?: q = -3'sd1;
      5'b1111_0: q = -3'sd1;
      5'b1111_1: q = 3'sd0;
      default:   q = 3'sd0;
    endcase
  end

endmodule
