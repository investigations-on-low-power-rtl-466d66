// fir3_tap_check: test harness for one fast_fir3_sym of NTAPS taps. Drives
// a random symmetric response (8-bit) and random 4-bit samples, including
// the extremes, and compares every output with the direct convolution of
// the serial stream, two clocks after the block was applied. Raises `done`
// when NBLK blocks have been checked.
module fir3_tap_check #(
  parameter int unsigned NTAPS = 81,
  parameter int unsigned NBLK  = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned DW = 4, CW = 8, ACC_W = 24, NH = (NTAPS + 1) / 2;

  logic rst;
  logic [CW-1:0]    coef  [NH];
  logic [DW-1:0]    x_in  [3];
  logic [ACC_W-1:0] y_out [3];
  int hist [NTAPS];
  int exp_q [$];

  fast_fir3_sym #(.NTAPS(NTAPS)) dut (.clk(clk), .rst(rst), .coef(coef), .x_in(x_in), .y_out(y_out));

  function automatic int conv();
    int acc = 0;
    for (int k = 0; k < NTAPS; k++)
      acc += int'(signed'(coef[k < NH ? k : NTAPS - 1 - k])) * hist[k];
    return acc;
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0; rst = 1'b1;
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    for (int k = 0; k < NH; k++) coef[k] = CW'($urandom);
    coef[0] = 8'h80;
    for (int i = 0; i < 3; i++) x_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int b = 0; b < NBLK + 1; b++) begin
      for (int i = 0; i < 3; i++) begin
        int s;
        s = (b < 20) ? ((i == 1) ? 7 : -8) : int'($urandom_range(15)) - 8;
        for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = s;
        exp_q.push_back(conv());
        x_in[i] = DW'(s);
      end
      @(posedge clk);
      #1;
      if (b > 0) begin
        for (int i = 0; i < 3; i++) begin
          int e;
          e = exp_q.pop_front();
          checks++;
          if (int'(signed'(y_out[i])) != e) begin
            failures++;
            if (failures < 10) $display("FAIL %0d taps y%0d got %0d exp %0d", NTAPS, i, signed'(y_out[i]), e);
          end
        end
      end
    end
    done = 1'b1;
  end
endmodule
