// tb_coef_precompute: random symmetric 27-tap responses; checks every output
// set against the polyphase components computed here from the full response
// h(k) = h(26-k), and checks that hs is symmetric and ht antisymmetric.
// A watchdog ends the run.
module tb_coef_precompute;
  localparam int unsigned NTAPS = 27, CW = 8, K = NTAPS / 3, NH = (NTAPS + 1) / 2;
  logic clk = 1'b0;
  logic [CW-1:0] coef [NH];
  logic [CW-1:0] h0 [K], h1 [K];
  logic [CW:0]   hs [K], ht [K], h01 [K], h12 [K];
  int checks = 0, failures = 0;

  coef_precompute #(.NTAPS(NTAPS), .CW(CW)) dut (
    .coef(coef), .h0(h0), .h1(h1), .hs(hs), .ht(ht), .h01(h01), .h12(h12)
  );

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      int hf [NTAPS];
      for (int k = 0; k < NH; k++) coef[k] = CW'($urandom);
      for (int k = 0; k < NTAPS; k++) hf[k] = int'(signed'(coef[k < NH ? k : NTAPS - 1 - k]));
      #1;
      for (int i = 0; i < K; i++) begin
        chk(int'(signed'(h0[i])),  hf[3*i],                  "h0");
        chk(int'(signed'(h1[i])),  hf[3*i+1],                "h1");
        chk(int'(signed'(hs[i])),  hf[3*i] + hf[3*i+2],      "hs");
        chk(int'(signed'(ht[i])),  hf[3*i] - hf[3*i+2],      "ht");
        chk(int'(signed'(h01[i])), hf[3*i] + hf[3*i+1],      "h01");
        chk(int'(signed'(h12[i])), hf[3*i+1] + hf[3*i+2],    "h12");
        chk(int'(signed'(hs[i])),  int'(signed'(hs[K-1-i])), "hs symmetric");
        chk(int'(signed'(ht[i])), -int'(signed'(ht[K-1-i])), "ht antisymmetric");
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
