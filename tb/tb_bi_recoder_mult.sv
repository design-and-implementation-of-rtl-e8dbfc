// tb_bi_recoder_mult: exhaustive self-check of the 8x8 unsigned Bi-Recoder multiplier.
//
// Every pair of 8-bit operands (65536 pairs) is applied and the 16-bit product compared
// with the integer product a * b.
module tb_bi_recoder_mult;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [15:0] p;

  bi_recoder_mult u_dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("mismatch %0d * %0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
