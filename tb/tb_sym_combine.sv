// tb_sym_combine: builds p = (ha+hb)(xa+xb) and q = (ha-hb)(xa-xb) from
// random integers and checks that the butterfly returns ha*xa + hb*xb and
// ha*xb + hb*xa, including negative values. A watchdog ends the run.
module tb_sym_combine;
  localparam int unsigned W = 24;
  logic clk = 1'b0;
  logic [W-1:0] p, q, s, d;
  int checks = 0, failures = 0;

  sym_combine #(.W(W)) dut (.p(p), .q(q), .s(s), .d(d));

  always #5 clk = ~clk;

  function automatic int rnd(int range);
    return int'($urandom_range(2 * range)) - range;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ha, hb, xa, xb;
      ha = rnd(2000); hb = rnd(2000); xa = rnd(1000); xb = rnd(1000);
      p = W'((ha + hb) * (xa + xb));
      q = W'((ha - hb) * (xa - xb));
      #1;
      checks += 2;
      if (int'(signed'(s)) != ha * xa + hb * xb) begin
        failures++;
        $display("FAIL s got %0d exp %0d", signed'(s), ha * xa + hb * xb);
      end
      if (int'(signed'(d)) != ha * xb + hb * xa) begin
        failures++;
        $display("FAIL d got %0d exp %0d", signed'(d), ha * xb + hb * xa);
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
