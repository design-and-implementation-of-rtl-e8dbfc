// rc_csla_group: one group of the reduced complexity square-root carry-select adder.
//
// A conventional carry-select group adds its slice twice, once by a ripple-carry adder and
// once more through a binary-to-excess-1 converter, and a multiplexer picks one result by
// the carry from the group below. The reduced group drops that duplication: bit 0 is a
// full adder that takes the group's carry in directly, every higher bit is a half adder
// giving p = a^b and g = a&b, and the carry is carried up the group as
// c[i] = g[i] | (p[i] & c[i-1]) with sum[i] = p[i] ^ c[i-1]. The half adders do not depend
// on the carry in, so in a chain of groups they all settle in parallel and only the short
// AND/OR path of each group waits for the carry. The full adder / half adder split and the
// carry-in and carry-out of the group follow the published 4-bit group; the width W is a
// parameter so the same module gives the 2-, 3- and 5-bit groups.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Purely combinational.
module rc_csla_group #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] p;  // half adder sums (propagate)
  logic [W-1:0] g;  // half adder carries (generate)
  logic [W-1:0] c;  // carry out of each bit

  assign p = a ^ b;
  assign g = a & b;

  // bit 0: full adder on a[0], b[0] and the group carry in
  assign sum[0] = p[0] ^ cin;
  assign c[0]   = g[0] | (p[0] & cin);

  // higher bits: half adder outputs combined with the carry from the bit below
  for (genvar i = 1; i < W; i++) begin : g_bit
    assign sum[i] = p[i] ^ c[i - 1];
    assign c[i]   = g[i] | (p[i] & c[i - 1]);
  end

  assign cout = c[W-1];

endmodule
