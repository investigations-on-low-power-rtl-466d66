// tb_csa_tree: random test of the carry-save reduction with 9 operands of
// 24 bits (four 3:2 levels). Checks sum_o + carry_o against the sum of the
// operands modulo 2**24. A watchdog ends the run.
module tb_csa_tree;
  localparam int unsigned N = 9, W = 24;
  logic clk = 1'b0;
  logic [W-1:0] ops [N];
  logic [W-1:0] s, c;
  int checks = 0, failures = 0;

  csa_tree #(.N(N), .W(W)) dut (.ops(ops), .sum_o(s), .carry_o(c));

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [W-1:0] exp;
      exp = '0;
      for (int i = 0; i < N; i++) begin
        ops[i] = (n < 10) ? '1 : W'($urandom);
        exp += ops[i];
      end
      #1;
      checks++;
      if (W'(s + c) !== exp) begin
        failures++;
        $display("FAIL got %h exp %h", W'(s + c), exp);
      end
    end
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
