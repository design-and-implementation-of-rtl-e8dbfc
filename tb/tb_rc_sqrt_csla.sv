// tb_rc_sqrt_csla: self-check of the 16-bit reduced complexity square-root carry-select
// adder.
//
// Applies corner vectors (carries that ripple across every group boundary, all ones plus
// carry in) and random vectors, and compares {cout, sum} with the integer a + b + cin.
// It also counts, for each group boundary (after bits 1, 3, 6 and 10), how often a carry
// crossed it, and fails if one never did.
module tb_rc_sqrt_csla;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, s;
  logic        cin, cout;
  int          crossed [4];
  localparam int BOUND [4] = '{2, 4, 7, 11};

  rc_sqrt_csla u_dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  task automatic apply(input logic [15:0] av, input logic [15:0] bv, input logic cv);
    logic [16:0] ref_sum;
    @(negedge clk);
    a = av; b = bv; cin = cv;
    #1;
    ref_sum = 17'(av) + 17'(bv) + 17'(cv);
    checks++;
    if ({cout, s} !== ref_sum) begin
      failures++;
      $display("mismatch a=%h b=%h cin=%0d got %h exp %h", av, bv, cv, {cout, s}, ref_sum);
    end
    for (int k = 0; k < 4; k++) begin
      logic [16:0] low;
      low = 17'(av & 16'((1 << BOUND[k]) - 1)) + 17'(bv & 16'((1 << BOUND[k]) - 1)) + 17'(cv);
      if (low[BOUND[k]]) crossed[k]++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (crossed[k]) crossed[k] = 0;
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h7FFF, 16'h0001, 1'b0);
    for (int k = 0; k < 16; k++) apply(16'((1 << k) - 1), 16'd1, 1'b0);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (crossed[k] == 0) begin
        failures++;
        $display("no carry ever crossed group boundary at bit %0d", BOUND[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
