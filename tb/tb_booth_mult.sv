// tb_booth_mult: exhaustive test of the 6 x 10-bit signed Booth multiplier
// (every multiplicand against every multiplier), comparing p with the
// integer product. A watchdog ends the run.
module tb_booth_mult;
  localparam int unsigned MD_W = 6, MR_W = 10, PW = 16;
  logic clk = 1'b0;
  logic [MD_W-1:0] md;
  logic [MR_W-1:0] mr;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;

  booth_mult #(.MD_W(MD_W), .MR_W(MR_W), .PW(PW)) dut (.md(md), .mr(mr), .p(p));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < (1 << MD_W); i++) begin
      for (int j = 0; j < (1 << MR_W); j++) begin
        int exp;
        md = MD_W'(i);
        mr = MR_W'(j);
        #1;
        exp = int'(signed'(md)) * int'(signed'(mr));
        checks++;
        if (int'(signed'(p)) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d got %0d", signed'(md), signed'(mr), signed'(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
