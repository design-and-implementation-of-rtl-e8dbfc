// bi_recoder_mult: unsigned Bi-Recoder multiplier with a reduced complexity SQRT CSLA.
//
// The product is formed in three steps. The Bi-Recoder generator turns each bit pair of
// the multiplier b into one partial product (0, a, 2a or 3a), giving WIDTH/2 rows; row k
// is shifted left by 2k bits. A Wallace tree of full adders reduces these rows to two,
// and a reduced complexity square-root carry-select adder of 2*WIDTH bits adds the two
// rows into the product. For the default 8x8 multiplier that is four 10-bit partial
// products, a two-level Wallace reduction and a 16-bit adder with groups of 2, 2, 3, 4
// and 5 bits, as in the published design. Operands are treated as unsigned.
//
// Interface: a (multiplicand), b (multiplier), WIDTH bits each -> p, 2*WIDTH bits.
// Purely combinational, no clock.
module bi_recoder_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned NPP = WIDTH / 2;
  localparam int unsigned PW  = 2 * WIDTH;

  logic [NPP-1:0][WIDTH+1:0] pp;
  logic [NPP-1:0][PW-1:0]    rows;
  logic [PW-1:0]             sum_row;
  logic [PW-1:0]             carry_row;

  bi_recoder_ppg #(.WIDTH(WIDTH)) u_ppg (
    .a (a),
    .b (b),
    .pp(pp)
  );

  always_comb begin
    for (int k = 0; k < NPP; k++) rows[k] = PW'(pp[k]) << (2 * k);
  end

  wallace_reducer #(.ROWS(NPP), .W(PW)) u_wallace (
    .rows     (rows),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  rc_sqrt_csla #(.WIDTH(PW)) u_final (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .sum (p),
    .cout()
  );

endmodule
