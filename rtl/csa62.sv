// [6:2] carry-save adder: six W-bit vectors plus four carry-ins reduced to
// a sum vector and a carry vector.
//
// Each bit slice holds four full adders: FA(a,b,c) and FA(d,e,f) on the
// first level, a second-level FA adding both sums and one lateral carry,
// and a third-level FA adding that sum and two more lateral carries. The
// four carries of a slice (two first-level, one second-level, one
// third-level) go laterally to the next slice; the third-level carry of
// slice i-1 is the carry output c_o[i]. In the least significant slice the
// lateral carries are the carry-ins cin[3:0]; cin[3] is c_o[0]. The four
// lateral carries of the top slice leave as cout.
//   sum(a..f) + cin[0] + cin[1] + cin[2] + cin[3]
//     = s_o + c_o + 2^W * (cout[0] + cout[1] + cout[2] + cout[3])
// Purely combinational. The slice structure follows the published [6:2]
// adder; the assignment of lateral carries to FA inputs is read from the
// slice drawing.
module csa62
  import cdiv_pkg::*;
#(
  parameter int unsigned W = 36
) (
  input  logic [W-1:0] a, b, c, d, e, f,
  input  logic [3:0]   cin,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o,
  output logic [3:0]   cout
);

  logic [3:0] lat [W+1];  // lat[i]: lateral carries into slice i

  always_comb begin
    logic [1:0] r1, r2, r3, r4;
    lat[0] = cin;
    for (int i = 0; i < W; i++) begin
      r1 = fa(a[i], b[i], c[i]);
      r2 = fa(d[i], e[i], f[i]);
      r3 = fa(r1[0], r2[0], lat[i][0]);
      r4 = fa(r3[0], lat[i][1], lat[i][2]);
      s_o[i] = r4[0];
      c_o[i] = lat[i][3];
      lat[i+1] = {r4[1], r3[1], r2[1], r1[1]};
    end
    cout = lat[W];
  end

endmodule
