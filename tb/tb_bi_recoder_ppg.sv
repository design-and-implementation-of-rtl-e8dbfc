// tb_bi_recoder_ppg: exhaustive self-check of the 8-bit Bi-Recoder partial product
// generator.
//
// For every multiplicand a and multiplier b (65536 pairs) each of the four partial
// products must equal a times the value of its multiplier bit pair (0, 1, 2 or 3). The
// number of times each selection code occurs is counted and must be non-zero.
module tb_bi_recoder_ppg;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]      a, b;
  logic [3:0][9:0] pp;
  int              code_seen [4];

  bi_recoder_ppg u_dut (.a(a), .b(b), .pp(pp));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (code_seen[c]) code_seen[c] = 0;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {a, b} = 16'(v);
      #1;
      for (int k = 0; k < 4; k++) begin
        int unsigned digit;
        digit = int'(b[2*k +: 2]);
        code_seen[digit]++;
        checks++;
        if (pp[k] !== 10'(int'(a) * digit)) begin
          failures++;
          if (failures < 10)
            $display("mismatch a=%0d b=%0d row %0d got %0d", a, b, k, pp[k]);
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (code_seen[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
