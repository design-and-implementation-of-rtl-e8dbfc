// ripple_carry_adder: W-bit ripple-carry adder built from a chain of full adders.
//
// It forms the lowest group (bits [1:0]) of the square-root carry-select adder, where the
// published 16-bit adder uses a 2-bit ripple-carry adder. Each stage computes
// s = a ^ b ^ c and passes c' = a&b | c&(a^b) to the next stage. Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i + 1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule
