// rc_sqrt_csla: reduced complexity square-root carry-select adder (SQRT CSLA).
//
// The word is split into groups whose widths grow by one bit per group, the square-root
// layout: for the default 16 bits the groups are [1:0], [3:2], [6:4], [10:7] and [15:11].
// Group 0 is a 2-bit ripple-carry adder fed by cin; every higher group is an rc_csla_group
// whose carry in is the carry out of the group below. Group layout and group types follow
// the published 16-bit adder and its reduced 4-bit group. The carry in port is this
// design's addition (the published 16-bit adder ties it to 0); tie it to 0 for a plain
// add. Widths other than 16 reuse the same group sequence with the last group cut short.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Purely combinational.
module rc_sqrt_csla
  import fir_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = csla_num_groups(WIDTH);

  logic [NG:0] carry;
  assign carry[0] = cin;

  for (genvar gi = 0; gi < NG; gi++) begin : g_grp
    localparam int unsigned LSB = csla_group_lsb(gi);
    localparam int unsigned GW  = csla_group_bits(WIDTH, gi);
    if (gi == 0) begin : g_rca
      ripple_carry_adder #(.W(GW)) u_rca (
        .a   (a[LSB +: GW]),
        .b   (b[LSB +: GW]),
        .cin (carry[gi]),
        .sum (sum[LSB +: GW]),
        .cout(carry[gi + 1])
      );
    end else begin : g_rc
      rc_csla_group #(.W(GW)) u_grp (
        .a   (a[LSB +: GW]),
        .b   (b[LSB +: GW]),
        .cin (carry[gi]),
        .sum (sum[LSB +: GW]),
        .cout(carry[gi + 1])
      );
    end
  end

  assign cout = carry[NG];

endmodule
