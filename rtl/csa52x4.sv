// [5:2]^4 adder: five W-bit vectors plus four lateral carry-ins reduced to
// a sum vector and a carry vector.
//
// It takes the place of the upper slices of the [6:2] adder once the
// shifted residual enters as one non-redundant vector g instead of a sum
// and a carry vector. A slice holds FA(g,c,d), a half adder HA(e,f), a
// second-level FA adding both sums and one lateral carry, and a
// third-level FA adding two more lateral carries. Unlike a plain [5:2]
// adder it accepts four lateral carries, because those come from the
// [6:2] adder below it.
//   sum(g,c,d,e,f) + cin[0] + cin[1] + cin[2] + cin[3]
//     = s_o + c_o + 2^W * (cout[0] + cout[1] + cout[2] + cout[3])
// Combinational. Slice structure as published; the lateral-carry wiring
// matches csa62.
module csa52x4
  import cdiv_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] g, c, d, e, f,
  input  logic [3:0]   cin,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o,
  output logic [3:0]   cout
);

  logic [3:0] lat [W+1];

  always_comb begin
    logic [1:0] r1, r2, r3, r4;
    lat[0] = cin;
    for (int i = 0; i < W; i++) begin
      r1 = fa(g[i], c[i], d[i]);
      r2 = {e[i] & f[i], e[i] ^ f[i]};  // half adder
      r3 = fa(r1[0], r2[0], lat[i][0]);
      r4 = fa(r3[0], lat[i][1], lat[i][2]);
      s_o[i] = r4[0];
      c_o[i] = lat[i][3];
      lat[i+1] = {r4[1], r3[1], r2[1], r1[1]};
    end
    cout = lat[W];
  end

endmodule
