// bi_recoder_fir: direct form FIR filter built on Bi-Recoder multipliers.
//
// y[n] = sum_{k=0}^{N_TAPS-1} COEFF[k] * x[n-k], with 8-bit unsigned samples, 8-bit
// unsigned fixed coefficients and three taps by default. A shift register of N_TAPS-1
// sample registers (the z^-1 chain) holds past samples; tap 0 is the incoming sample
// itself. Each tap has its own Bi-Recoder multiplier (sample as multiplicand, coefficient
// as the recoded multiplier), and the products are summed along a chain of reduced
// complexity square-root carry-select adders, as in the direct form structure. The tap
// count, word lengths and multiplier follow the published design. This design's own
// choices: the coefficient values (the published design gives none; the defaults
// 27, 228, 27 = 8'b00_01_10_11, 8'b11_10_01_00 make every recoder selection occur),
// unsigned arithmetic, a full-precision 18-bit output, the sample strobe and the
// output register.
//
// Timing: on a rising clk with in_valid high the sample x_in is taken, the z^-1 chain
// shifts, and y_out is loaded with the filter output for that sample; out_valid follows
// in_valid one clock later. One sample per clock, latency one clock. rst_n is
// synchronous and active low; it clears the z^-1 chain and the output register.
module bi_recoder_fir
  import fir_pkg::*;
#(
  parameter int unsigned                       TAPS  = N_TAPS,
  parameter int unsigned                       W     = DATA_W,
  parameter logic [TAPS-1:0][W-1:0]            COEFF = {8'd27, 8'd228, 8'd27},
  parameter int unsigned                       OUT_W = 2 * W + $clog2(TAPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     x_in,
  output logic             out_valid,
  output logic [OUT_W-1:0] y_out
);

  logic [TAPS-1:0][W-1:0]     taps;   // taps[k] = x[n-k]
  logic [TAPS-2:0][W-1:0]     dline;  // z^-1 registers, dline[k] = x[n-1-k]
  logic [TAPS-1:0][2*W-1:0]   prod;
  logic [TAPS-1:0][OUT_W-1:0] acc;    // acc[k] = sum of products 0..k

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < TAPS; k++) taps[k] = dline[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dline <= '0;
    end else if (in_valid) begin
      dline[0] <= x_in;
      for (int k = 1; k < TAPS - 1; k++) dline[k] <= dline[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    bi_recoder_mult #(.WIDTH(W)) u_mult (
      .a(taps[k]),
      .b(COEFF[k]),
      .p(prod[k])
    );
  end

  assign acc[0] = OUT_W'(prod[0]);

  for (genvar k = 1; k < TAPS; k++) begin : g_acc
    rc_sqrt_csla #(.WIDTH(OUT_W)) u_add (
      .a   (acc[k-1]),
      .b   (OUT_W'(prod[k])),
      .cin (1'b0),
      .sum (acc[k]),
      .cout()
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= acc[TAPS-1];
    end
  end

endmodule
