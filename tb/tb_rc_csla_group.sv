// tb_rc_csla_group: exhaustive self-check of the reduced complexity carry-select group.
//
// Two groups are tested, the 4-bit group (default width) and a 5-bit group, over every
// combination of a, b and carry in. The reference is the integer sum a + b + cin,
// compared with {cout, sum}. One vector per clock; a watchdog ends the run if the
// stimulus does not finish.
module tb_rc_csla_group;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;

  rc_csla_group u_g4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  rc_csla_group #(.W(5)) u_g5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      {c4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + c4)) begin
        failures++;
        $display("W4 mismatch a=%0d b=%0d cin=%0d got %0d", a4, b4, c4, {co4, s4});
      end
    end
    for (int v = 0; v < 2048; v++) begin
      @(negedge clk);
      {c5, a5, b5} = 11'(v);
      #1;
      checks++;
      if ({co5, s5} !== 6'(a5 + b5 + c5)) begin
        failures++;
        $display("W5 mismatch a=%0d b=%0d cin=%0d got %0d", a5, b5, c5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
