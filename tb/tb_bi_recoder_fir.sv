// tb_bi_recoder_fir: end-to-end self-check of the 3-tap Bi-Recoder FIR filter at its
// default parameters (8-bit samples, coefficients 27, 228, 27, 18-bit output).
//
// A stream of samples is fed with random gaps in in_valid, a reset is applied in the
// middle of the stream, and every output is compared with a reference model that keeps
// its own sample history and computes sum_k COEFF[k] * x[n-k] with integer arithmetic.
// Timing checks: out_valid must follow in_valid exactly one clock later, and y_out must
// hold its value while no sample arrives. Mechanisms counted, each must occur at least
// once: samples accepted (z^-1 shift), idle cycles (hold), resets that clear the history,
// outputs that need more than 16 bits (carries out of the product width through the
// accumulation adders), full-scale input samples, and each of the four recoder selection
// codes in the coefficient bit pairs of a non-zero tap.
module tb_bi_recoder_fir;
  import fir_pkg::*;

  localparam int unsigned W     = DATA_W;
  localparam int unsigned TAPS  = N_TAPS;
  localparam int unsigned OUT_W = 2 * W + $clog2(TAPS);
  localparam int          H [TAPS] = '{27, 228, 27};

  int checks   = 0;
  int failures = 0;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid;
  logic [W-1:0]     x_in;
  logic             out_valid;
  logic [OUT_W-1:0] y_out;

  always #5 clk = ~clk;

  bi_recoder_fir u_dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .out_valid(out_valid),
    .y_out    (y_out)
  );

  int hist [TAPS];          // reference history, hist[k] = x[n-k] after a sample
  int n_samples   = 0;
  int n_idle      = 0;
  int n_resets    = 0;
  int n_wide      = 0;
  int n_fullscale = 0;
  int code_seen [4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out();
    int acc = 0;
    for (int k = 0; k < TAPS; k++) acc += H[k] * hist[k];
    return acc;
  endfunction

  task automatic do_reset();
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    foreach (hist[k]) hist[k] = 0;
    n_resets++;
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("reset did not clear the output");
    end
  endtask

  // one clock: present a sample (or an idle cycle) and check the result after the edge
  task automatic step(input logic valid, input logic [W-1:0] x);
    logic [OUT_W-1:0] prev_y;
    int               expected;
    @(negedge clk);
    in_valid = valid;
    x_in     = x;
    prev_y   = y_out;
    if (valid) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      if (x == '1) n_fullscale++;
      for (int k = 0; k < TAPS; k++)
        if (hist[k] != 0)
          for (int d = 0; d < W / 2; d++) code_seen[(H[k] >> (2 * d)) & 3]++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== valid) begin
      failures++;
      $display("out_valid %0d one clock after in_valid %0d", out_valid, valid);
    end
    if (valid) begin
      n_samples++;
      expected = ref_out();
      if (expected >= (1 << 16)) n_wide++;
      checks++;
      if (int'(y_out) != expected) begin
        failures++;
        $display("sample %0d: y_out %0d expected %0d", n_samples, y_out, expected);
      end
    end else begin
      n_idle++;
      checks++;
      if (y_out !== prev_y) begin
        failures++;
        $display("y_out changed without a sample");
      end
    end
  endtask

  initial begin
    foreach (code_seen[c]) code_seen[c] = 0;
    do_reset();
    // impulse: the output must reproduce the coefficients in order
    step(1'b1, 8'd1);
    for (int k = 1; k < TAPS + 2; k++) step(1'b1, 8'd0);
    // full-scale step
    for (int k = 0; k < TAPS + 1; k++) step(1'b1, 8'hFF);
    // random stream with gaps
    for (int i = 0; i < 3000; i++) begin
      if (i == 1500) do_reset();
      step(($urandom % 4) != 0, 8'($urandom));
    end
    // mechanism coverage
    checks++; if (n_samples   == 0) begin failures++; $display("no sample accepted"); end
    checks++; if (n_idle      == 0) begin failures++; $display("no idle cycle"); end
    checks++; if (n_resets    <  2) begin failures++; $display("no mid-stream reset"); end
    checks++; if (n_wide      == 0) begin failures++; $display("no output above 16 bits"); end
    checks++; if (n_fullscale == 0) begin failures++; $display("no full-scale sample"); end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (code_seen[c] == 0) begin failures++; $display("recoder code %0d never used", c); end
    end
    $display("samples=%0d idle=%0d resets=%0d wide_outputs=%0d fullscale=%0d codes=%0d/%0d/%0d/%0d",
             n_samples, n_idle, n_resets, n_wide, n_fullscale,
             code_seen[0], code_seen[1], code_seen[2], code_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
