// tb_sym_subfilter: checks the direct-form sub-filter in all three folding
// modes (9 taps: general, symmetric, antisymmetric; 8 taps: symmetric) with
// random samples and random coefficients of the matching symmetry. After
// each clock edge y must equal sum_i h[i] * x(t-i), x(t) being the sample
// taken at that edge, computed here from a history of the inputs. Also
// checks that reset empties the delay line (y = 0 right after reset).
// A watchdog ends the run.
module tb_sym_subfilter;
  import fir_pkg::*;
  localparam int unsigned XW = 5, HW = 9, ACC_W = 24;
  logic clk = 1'b0, rst = 1'b1;
  logic [XW-1:0] x;
  logic [HW-1:0] hn [9], hsy [9], han [9], he [8];
  logic [ACC_W-1:0] yn, ysy, yan, ye;
  int checks = 0, failures = 0;
  int hist [9];

  sym_subfilter #(.K(9), .XW(XW), .HW(HW), .FOLD(FOLD_NONE), .ACC_W(ACC_W)) u_n  (.clk(clk), .rst(rst), .x(x), .h(hn),  .y(yn));
  sym_subfilter #(.K(9), .XW(XW), .HW(HW), .FOLD(FOLD_SYM),  .ACC_W(ACC_W)) u_s  (.clk(clk), .rst(rst), .x(x), .h(hsy), .y(ysy));
  sym_subfilter #(.K(9), .XW(XW), .HW(HW), .FOLD(FOLD_ANTI), .ACC_W(ACC_W)) u_a  (.clk(clk), .rst(rst), .x(x), .h(han), .y(yan));
  sym_subfilter #(.K(8), .XW(XW), .HW(HW), .FOLD(FOLD_SYM),  .ACC_W(ACC_W)) u_e  (.clk(clk), .rst(rst), .x(x), .h(he),  .y(ye));

  always #5 clk = ~clk;

  task automatic chk(input logic [ACC_W-1:0] got, input int exp, input string what);
    checks++;
    if (int'(signed'(got)) != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, signed'(got), exp);
    end
  endtask

  initial begin
    x = '0;
    for (int i = 0; i < 9; i++) begin
      hn[i] = HW'($urandom);
      hsy[i] = '0; han[i] = '0;
    end
    for (int i = 0; i < 5; i++) begin
      hsy[i] = HW'($urandom); hsy[8-i] = hsy[i];
    end
    for (int i = 0; i < 4; i++) begin
      han[i] = HW'($urandom); han[8-i] = -han[i];
    end
    for (int i = 0; i < 4; i++) begin
      he[i] = HW'($urandom); he[7-i] = he[i];
    end
    for (int i = 0; i < 9; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    #1;
    chk(yn, 0, "after reset none");
    chk(ysy, 0, "after reset sym");
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int en, es, ea, ee;
      x = XW'($urandom);
      if (n < 20) x = XW'(1 << (XW - 1));   // most negative sample
      @(posedge clk);
      for (int i = 8; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(signed'(x));
      #1;
      en = 0; es = 0; ea = 0; ee = 0;
      for (int i = 0; i < 9; i++) begin
        en += int'(signed'(hn[i]))  * hist[i];
        es += int'(signed'(hsy[i])) * hist[i];
        ea += int'(signed'(han[i])) * hist[i];
      end
      for (int i = 0; i < 8; i++) ee += int'(signed'(he[i])) * hist[i];
      chk(yn, en, "none");
      chk(ysy, es, "sym");
      chk(yan, ea, "anti");
      chk(ye, ee, "sym8");
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
