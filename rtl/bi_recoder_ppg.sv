// bi_recoder_ppg: Bi-Recoder partial product generator.
//
// Instead of one AND row (or one 2:1 multiplexer) per multiplier bit, the multiplier b is
// taken two bits at a time. Each bit pair b[2k+1:2k] drives one 4:1 selection that outputs
//   00 -> 0,  01 -> a,  10 -> a << 1,  11 -> a + (a << 1) = 3a,
// so an 8-bit multiplier needs only four selections, each giving a 10-bit partial product
// pp[k] of weight 4**k. The 3a value is formed once and shared by all selections; it is
// added with the reduced complexity square-root carry-select adder. The selection rule,
// the four 10-bit products and the bit-pair slicing follow the published design; sharing
// one 3a adder among the selections is this design's choice. Operands are unsigned.
//
// Interface: a (multiplicand), b (multiplier), both WIDTH bits, WIDTH even ->
// pp[WIDTH/2] of WIDTH+2 bits each, not yet shifted to their weights. Combinational.
module bi_recoder_ppg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]                  a,
  input  logic [WIDTH-1:0]                  b,
  output logic [WIDTH/2-1:0][WIDTH+1:0]     pp
);

  localparam int unsigned NPP = WIDTH / 2;
  localparam int unsigned PPW = WIDTH + 2;

  logic [PPW-1:0] a1;   // a
  logic [PPW-1:0] a2;   // a << 1
  logic [PPW-1:0] a3;   // a + (a << 1)

  assign a1 = PPW'(a);
  assign a2 = PPW'(a) << 1;

  rc_sqrt_csla #(.WIDTH(PPW)) u_triple (
    .a   (a1),
    .b   (a2),
    .cin (1'b0),
    .sum (a3),
    .cout()
  );

  always_comb begin
    for (int k = 0; k < NPP; k++) begin
      unique case (b[2*k +: 2])
        2'b00: pp[k] = '0;
        2'b01: pp[k] = a1;
        2'b10: pp[k] = a2;
        2'b11: pp[k] = a3;
      endcase
    end
  end

endmodule
