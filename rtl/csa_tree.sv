// csa_tree: multi-operand carry-save adder. Reduces N operands of W bits to
// two, `sum_o` and `carry_o`, with sum_o + carry_o == sum of all operands
// (modulo 2**W). Each level groups the operands in threes and replaces every
// group by a row of full adders (3:2 counters): the sum bits and the carry
// bits shifted up by one. Operands left over at a level pass straight on.
// The carry out of the top bit of each counter falls outside the W-bit
// result, which is what a modulo-2**W sum needs.
// The document adds partial products and multiplier outputs with a carry-save
// adder that delivers a sum and a carry (the multi-operand "modified carry
// save adder"); the Wallace-style grouping is this design's choice.
// Purely combinational, ceil(log1.5(N/2)) full-adder delays deep.
module csa_tree #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  // number of operands left after `l` levels
  function automatic int unsigned count_at(int unsigned l);
    int unsigned n = N;
    for (int unsigned k = 0; k < l; k++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned n = N, l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LV = n_levels();

  // The levels are unrolled in one process. Each level reads the operand
  // list `v` of the level before and writes a fresh list `nv`.
  logic [W-1:0] v  [N];
  logic [W-1:0] nv [N];

  always_comb begin
    logic [W-1:0] a, b, c;
    int unsigned ni, ng;
    for (int unsigned i = 0; i < N; i++) v[i] = ops[i];
    for (int unsigned l = 0; l < LV; l++) begin
      ni = count_at(l);
      ng = ni / 3;
      for (int unsigned k = 0; k < N; k++) nv[k] = '0;
      for (int unsigned gi = 0; gi < N / 3; gi++) begin
        if (gi < ng) begin
          a = v[3*gi];
          b = v[3*gi+1];
          c = v[3*gi+2];
          nv[2*gi]   = a ^ b ^ c;                              // sum bits
          nv[2*gi+1] = ((a & b) | (a & c) | (b & c)) << 1;     // carry bits
        end
      end
      for (int unsigned k = 0; k < 2; k++) begin
        if (k < ni % 3) nv[2*ng+k] = v[3*ng+k];                // left-over operands
      end
      for (int unsigned k = 0; k < N; k++) v[k] = nv[k];
    end
    sum_o   = v[0];
    carry_o = (N > 1) ? v[N > 1 ? 1 : 0] : '0;
  end

endmodule
