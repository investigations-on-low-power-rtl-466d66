// tb_novel_csa: self-checking test of the 16-bit modified carry-save adder.
// Applies corner cases (all ones, long carry chains through every 3-bit
// group) and random operands, and compares {cout, sum} with a + b + cin
// computed as plain integer arithmetic. A watchdog ends the run.
module tb_novel_csa;
  localparam int unsigned W = 16;
  logic clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  novel_csa #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h exp %h", ta, tb_, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(16'h7fff, 16'h0001, 1'b0);
    apply(16'h00ff, 16'h0001, 1'b0);
    for (int k = 0; k < W; k++) begin
      apply(16'hffff >> k, 16'h0001, 1'b0);
      apply(16'(1) << k, 16'(1) << k, 1'b1);
      apply(~(16'(1) << k), 16'h0000, 1'b1);
    end
    for (int n = 0; n < 20000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
