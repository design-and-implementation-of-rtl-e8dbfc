// tb_wallace_reducer: self-check of the Wallace-tree row reduction.
//
// The default instance reduces four 16-bit rows, as in the 8x8 multiplier; a second
// instance reduces seven 12-bit rows to exercise more levels. Random rows, including rows
// shaped like shifted Bi-Recoder partial products, are applied; the two output rows must
// add up to the sum of the input rows modulo 2**W, and the carry row's bit 0 must be 0.
module tb_wallace_reducer;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][15:0] rows4;
  logic [15:0]      s4, c4;
  logic [6:0][11:0] rows7;
  logic [11:0]      s7, c7;

  wallace_reducer u_dut (.rows(rows4), .sum_row(s4), .carry_row(c4));
  wallace_reducer #(.ROWS(7), .W(12)) u_dut7 (.rows(rows7), .sum_row(s7), .carry_row(c7));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] ref4;
      logic [11:0] ref7;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (i % 2 == 0) rows4[k] = 16'($urandom);
        else            rows4[k] = 16'(10'($urandom)) << (2 * k);
      end
      for (int k = 0; k < 7; k++) rows7[k] = 12'($urandom);
      if (i == 0) begin
        rows4 = '1;
        rows7 = '1;
      end
      #1;
      ref4 = '0;
      for (int k = 0; k < 4; k++) ref4 += rows4[k];
      ref7 = '0;
      for (int k = 0; k < 7; k++) ref7 += rows7[k];
      checks++;
      if (16'(s4 + c4) !== ref4 || c4[0] !== 1'b0) begin
        failures++;
        if (failures < 10) $display("4-row mismatch got %h+%h exp %h", s4, c4, ref4);
      end
      checks++;
      if (12'(s7 + c7) !== ref7) begin
        failures++;
        if (failures < 10) $display("7-row mismatch got %h+%h exp %h", s7, c7, ref7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
