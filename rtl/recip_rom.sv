// Reciprocal table of the prescaling look-up (ROM and ROM_s).
//
// Each 16-bit word holds two unsigned magnitudes {hi, lo}, 2 integer and
// 6 fractional bits each, of the reciprocal of a folded divisor estimate
// a + i*b with a >= 1/2:
//   hi = rnd(a / (a^2 + b^2), 6),   lo = rnd(b / (a^2 + b^2), 6).
// SPECIAL = 0 gives the main ROM: 11 address bits {a[2..6], b[1..6]},
//   a = 0.1 a2..a6, b = 0.b1..b6 (2048 words).
// SPECIAL = 1 gives ROM_s for a = 1: 6 address bits, b = 0.b1..b6 (64 words).
// Entries are computed at elaboration time with integer arithmetic:
//   with A = 64a, B = 64b:  hi = floor((8192*A + A^2 + B^2) / (2*(A^2+B^2))).
// Read is synchronous: data appears one clock after the address.
module recip_rom #(
  parameter bit SPECIAL = 1'b0,
  parameter int unsigned AW = SPECIAL ? 6 : 11
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   data
);

  logic [15:0] mem [2**AW];

  function automatic logic [7:0] rnd_ratio(input int unsigned num, input int unsigned den);
    // round(4096 * num / den) to nearest, ties up
    int unsigned v;
    v = (8192 * num + den) / (2 * den);
    return v[7:0];
  endfunction

  function automatic logic [15:0] entry(input int unsigned idx);
    int unsigned a, b, m;
    if (SPECIAL) begin
      a = 64;
      b = idx % 64;
    end else begin
      a = 32 + (idx / 64);
      b = idx % 64;
    end
    m = a * a + b * b;
    return {rnd_ratio(a, m), rnd_ratio(b, m)};
  endfunction

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++) mem[i] = entry(i);
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
