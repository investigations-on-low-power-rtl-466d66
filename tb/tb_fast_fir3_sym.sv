// tb_fast_fir3_sym: end-to-end test of the 3-parallel 27-tap filter at its
// default parameters. The reference is the direct convolution
// y(n) = sum_k h(k) x(n-k) over the serial sample stream, with
// h(k) = h(26-k), computed here independently of the design.
//
// Phases:
//   1. impulse: a single 1 must reproduce h(0..26) on the outputs;
//   2. reference coefficient set (8-bit h(0..13) = 02 F7 2B 0C 35 ED 29 0E
//      39 02 F7 2B 0C 35, mirrored) with a constant input of -3;
//   3. the same set with random samples including the extremes -8 and 7;
//   4. reset in mid-stream, then several random symmetric coefficient sets
//      with random samples.
// Every output block is checked; the latency (block in before edge t,
// results after edge t+1) is checked by comparing at exactly that edge.
// Mechanism counters: sub-filter folding with nonzero antisymmetric branch
// output, the butterfly, both block-delay registers, a negative Booth digit
// in a multiplier, and a mid-stream reset. One that never happens counts as
// a failure. A watchdog ends the run.
module tb_fast_fir3_sym;
  localparam int unsigned NTAPS = 27, DW = 4, CW = 8, ACC_W = 24, NH = (NTAPS + 1) / 2;
  localparam int unsigned HLEN = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic [CW-1:0]    coef  [NH];
  logic [DW-1:0]    x_in  [3];
  logic [ACC_W-1:0] y_out [3];

  int checks = 0, failures = 0;
  int hist [HLEN];          // hist[0] = newest serial sample
  int exp_q [$];            // expected outputs, three per block
  int n_anti = 0, n_dly_b = 0, n_dly_f = 0, n_negdig = 0, n_reset = 0, n_comb = 0;

  fast_fir3_sym dut (.clk(clk), .rst(rst), .coef(coef), .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;

  function automatic int h_of(int k);
    return int'(signed'(coef[k < NH ? k : NTAPS - 1 - k]));
  endfunction

  function automatic int conv();
    int acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += h_of(k) * hist[k];
    return acc;
  endfunction

  // Push one block: record its expected outputs, then drive it.
  task automatic push_block(input int s0, input int s1, input int s2);
    int ss [3];
    ss[0] = s0; ss[1] = s1; ss[2] = s2;
    for (int i = 0; i < 3; i++) begin
      for (int k = HLEN - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = ss[i];
      exp_q.push_back(conv());
      x_in[i] = DW'(ss[i]);
    end
  endtask

  // One clock with a new block; outputs of the previous block are checked
  // right after this edge (two edges after that block was applied).
  int pending = 0;
  task automatic step(input int s0, input int s1, input int s2);
    push_block(s0, s1, s2);
    @(posedge clk);
    #1;
    if (pending > 0) begin
      for (int i = 0; i < 3; i++) begin
        int e = exp_q.pop_front();
        checks++;
        if (int'(signed'(y_out[i])) != e) begin
          failures++;
          if (failures < 20) $display("FAIL y%0d got %0d exp %0d", i, signed'(y_out[i]), e);
        end
      end
      pending--;
    end
    pending++;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    for (int i = 0; i < 3; i++) x_in[i] = '0;
    @(posedge clk);
    @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (y_out[i] != '0) begin
        failures++;
        $display("FAIL output %0d not cleared by reset", i);
      end
    end
    rst = 1'b0;
    for (int k = 0; k < HLEN; k++) hist[k] = 0;
    exp_q.delete();
    pending = 0;
  endtask

  // Flush: feed zeros until the previous data has been checked.
  task automatic run_zeros(input int nblk);
    for (int b = 0; b < nblk; b++) step(0, 0, 0);
  endtask

  // mechanism monitors
  always @(posedge clk) if (!rst) begin
    if (dut.y_t != '0)   n_anti++;
    if (dut.t_c != '0)   n_comb++;
    if (dut.dly_b != '0) n_dly_b++;
    if (dut.dly_f != '0) n_dly_f++;
    if (dut.u_sf_h0.g_mul[0].u_mul.digit[0].neg && dut.u_sf_h0.g_mul[0].u_mul.md != '0) n_negdig++;
  end

  logic [CW-1:0] ref_set [14] = '{8'h02, 8'hF7, 8'h2B, 8'h0C, 8'h35, 8'hED, 8'h29,
                                  8'h0E, 8'h39, 8'h02, 8'hF7, 8'h2B, 8'h0C, 8'h35};

  initial begin
    for (int i = 0; i < 3; i++) x_in[i] = '0;
    for (int k = 0; k < NH; k++) coef[k] = ref_set[k];
    for (int k = 0; k < HLEN; k++) hist[k] = 0;
    do_reset();

    // 1. impulse response
    step(1, 0, 0);
    run_zeros(12);
    // impulse at the middle phase as well
    step(0, 1, 0);
    run_zeros(12);

    // 2. constant input -3
    for (int b = 0; b < 30; b++) step(-3, -3, -3);

    // 3. random samples
    for (int b = 0; b < 300; b++) begin
      if (b < 10) step(-8, 7, -8);
      else step(int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8);
    end

    // 4. reset mid-stream, then random symmetric sets
    step(5, -6, 7);
    n_reset++;
    for (int set = 0; set < 6; set++) begin
      for (int k = 0; k < NH; k++) coef[k] = (set == 0) ? 8'h80 : CW'($urandom);
      do_reset();
      for (int b = 0; b < 200; b++)
        step(int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8);
      run_zeros(1);
    end

    $display("mechanisms: antisym=%0d butterfly=%0d delay_B=%0d delay_F=%0d neg_booth_digit=%0d reset=%0d",
             n_anti, n_comb, n_dly_b, n_dly_f, n_negdig, n_reset);
    if (n_anti == 0)   begin failures++; $display("FAIL antisymmetric branch never active"); end
    if (n_comb == 0)   begin failures++; $display("FAIL butterfly never active"); end
    if (n_dly_b == 0)  begin failures++; $display("FAIL block delay B never used"); end
    if (n_dly_f == 0)  begin failures++; $display("FAIL block delay F never used"); end
    if (n_negdig == 0) begin failures++; $display("FAIL no negative Booth digit seen"); end
    if (n_reset == 0)  begin failures++; $display("FAIL no mid-stream reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
