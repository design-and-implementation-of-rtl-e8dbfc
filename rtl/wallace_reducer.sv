// wallace_reducer: Wallace-tree reduction of partial product rows to two rows.
//
// Rows of equal width are reduced level by level. At each level the rows are taken three
// at a time and each triple passes through a row of full adders (3:2 counters): the sum
// bits form one new row and the carry bits, shifted up one place, form another; one or two
// rows left over pass to the next level unchanged. Levels repeat until two rows remain,
// which a carry-propagate adder then adds. For the four rows of the 8-bit Bi-Recoder
// multiplier this takes two levels: rows 0-2 become two rows, which with row 3 become
// the final two. Reducing four rows to two by the Wallace method follows the published
// design; the exact grouping of rows is this design's choice. Carries out of the top bit
// are dropped, so the result is correct modulo 2**W, which is exact when the true sum
// fits in W bits. Bit 0 of carry_row is always 0, since full adder carries move up one
// place; it is kept so that both output rows have the same width.
//
// Interface: rows[ROWS] of W bits -> sum_row, carry_row (W bits each) with
// sum_row + carry_row == sum of rows (mod 2**W). Combinational.
module wallace_reducer #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_row,
  output logic [W-1:0]           carry_row
);

  always_comb begin
    logic [ROWS-1:0][W-1:0] cur;
    logic [ROWS-1:0][W-1:0] nxt;
    int unsigned n;
    int unsigned m;
    cur = rows;
    nxt = '0;
    n   = ROWS;
    for (int unsigned lvl = 0; lvl < ROWS; lvl++) begin
      if (n > 2) begin
        m   = 0;
        nxt = '0;
        // full adder rows on each complete triple
        for (int unsigned t = 0; t < ROWS / 3; t++) begin
          if (3 * t + 2 < n) begin
            nxt[m]     = cur[3*t] ^ cur[3*t+1] ^ cur[3*t+2];
            nxt[m + 1] = ((cur[3*t] & cur[3*t+1]) | (cur[3*t] & cur[3*t+2]) |
                          (cur[3*t+1] & cur[3*t+2])) << 1;
            m += 2;
          end
        end
        // rows left over pass through
        for (int unsigned r = 0; r < ROWS; r++) begin
          if (r >= 3 * (n / 3) && r < n) begin
            nxt[m] = cur[r];
            m += 1;
          end
        end
        cur = nxt;
        n   = m;
      end
    end
    sum_row   = cur[0];
    carry_row = (n > 1) ? cur[1] : '0;
  end

endmodule
