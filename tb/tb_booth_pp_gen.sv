// tb_booth_pp_gen: exhaustive test of one partial-product generator (digit
// position 2). For every 6-bit multiplicand and every Booth digit it checks
// row + corr == (d * M) << 4 modulo 2**16. A watchdog ends the run.
module tb_booth_pp_gen;
  import fir_pkg::*;
  localparam int unsigned MD_W = 6, PW = 16, POS = 2;
  logic clk = 1'b0;
  logic [MD_W-1:0] md;
  booth_digit_t digit;
  logic [PW-1:0] row, corr;
  int checks = 0, failures = 0;

  booth_pp_gen #(.MD_W(MD_W), .PW(PW), .POS(POS)) dut (.md(md), .digit(digit), .row(row), .corr(corr));

  always #5 clk = ~clk;

  initial begin
    // digit codes: {neg, two, one}; 3'b011 and 3'b111 are never produced
    for (int m = 0; m < (1 << MD_W); m++) begin
      for (int dc = 0; dc < 8; dc++) begin
        int dv;
        logic [PW-1:0] exp;
        if (dc[1:0] == 2'b11) continue;
        md = MD_W'(m);
        digit = booth_digit_t'(dc[2:0]);
        #1;
        dv = dc[1] ? 2 : (dc[0] ? 1 : 0);
        if (dc[2]) dv = -dv;
        exp = PW'(dv * int'(signed'(md)) * (1 << (2 * POS)));
        checks++;
        if (PW'(row + corr) !== exp) begin
          failures++;
          $display("FAIL md=%0d digit=%0d got %h exp %h", signed'(md), dv, PW'(row + corr), exp);
        end
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
