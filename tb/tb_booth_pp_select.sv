// tb_booth_pp_select: exhaustive test of the radix-4 Booth recoder. For every
// 10-bit multiplier it rebuilds the value sum_j d_j * 4**j from the digits
// and checks it against the signed multiplier; it also checks that no digit
// claims both |d| = 1 and |d| = 2. A watchdog ends the run.
module tb_booth_pp_select;
  import fir_pkg::*;
  localparam int unsigned MR_W = 10;
  logic clk = 1'b0;
  logic [MR_W-1:0] mr;
  booth_digit_t digit [MR_W/2];
  int checks = 0, failures = 0;

  booth_pp_select #(.MR_W(MR_W)) dut (.mr(mr), .digit(digit));

  always #5 clk = ~clk;

  initial begin
    for (int v = 0; v < (1 << MR_W); v++) begin
      int acc, dv, w;
      mr = MR_W'(v);
      #1;
      acc = 0; w = 1;
      for (int j = 0; j < MR_W/2; j++) begin
        dv = digit[j].two ? 2 : (digit[j].one ? 1 : 0);
        if (digit[j].neg) dv = -dv;
        acc += dv * w;
        w *= 4;
        checks++;
        if (digit[j].one && digit[j].two) begin
          failures++;
          $display("FAIL mr=%h digit %0d one and two both set", mr, j);
        end
      end
      checks++;
      if (acc != int'(signed'(mr))) begin
        failures++;
        $display("FAIL mr=%h recoded %0d exp %0d", mr, acc, int'(signed'(mr)));
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
