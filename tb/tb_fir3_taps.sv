// tb_fir3_taps: runs the 3-parallel filter at the longer lengths of the
// multiplier-count study, 81 and 147 taps (sub-filters of 27 and 49 taps),
// each against a direct-convolution reference (see fir3_tap_check).
// A watchdog ends the run.
module tb_fir3_taps;
  logic clk = 1'b0;
  logic d81, d147;
  int c81, f81, c147, f147;
  int checks, failures;

  fir3_tap_check #(.NTAPS(81))  u81  (.clk(clk), .done(d81),  .checks(c81),  .failures(f81));
  fir3_tap_check #(.NTAPS(147)) u147 (.clk(clk), .done(d147), .checks(c147), .failures(f147));

  always #5 clk = ~clk;

  initial begin
    wait (d81 && d147);
    checks = c81 + c147;
    failures = f81 + f147;
    $display("81 taps: %0d checks, 147 taps: %0d checks", c81, c147);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c81 + c147, f81 + f147 + 1);
    $finish;
  end
endmodule
