// sym_subfilter: one direct-form sub-filter of the parallel filter.
//
//   y = sum_{i=0..K-1} h[i] * r[i]
//
// where r[0..K-1] is a register delay line: on every clock r[0] takes the
// input x and r[i] takes r[i-1]. So y, valid right after a clock edge,
// belongs to the sample taken at that edge (r[0]) and the K-1 before it.
// As in the document's coefficient-multiplication structure, each tap has
// a register and a multiplier, and the products are summed by a
// multi-operand carry-save adder. The final addition uses the modified
// carry-save adder.
//
// FOLD selects how symmetric coefficients are used (the document halves the
// multiplier count by combining symmetric coefficients):
//   FOLD_NONE  K multipliers.
//   FOLD_SYM   h[i] == h[K-1-i]: r[i] + r[K-1-i] is formed first and
//              multiplied by h[i]; ceil(K/2) multipliers.
//   FOLD_ANTI  h[i] == -h[K-1-i]: r[i] - r[K-1-i] is formed first; the centre
//              tap of an odd K is zero; floor(K/2) multipliers.
// With folding only h[0..ceil(K/2)-1] are read; the others are ignored.
//
// Widths: x is XW bits signed, h is HW bits signed, y is ACC_W bits signed
// and exact as long as the true sum fits. Products are PW bits (default 16).
// Reset (synchronous, active high) clears the delay line.
module sym_subfilter
  import fir_pkg::*;
#(
  parameter int unsigned K     = 9,
  parameter int unsigned XW    = 4,
  parameter int unsigned HW    = 8,
  parameter fold_t       FOLD  = FOLD_NONE,
  parameter int unsigned PW    = PW_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [XW-1:0]        x,
  input  logic [HW-1:0]        h [K],
  output logic [ACC_W-1:0]     y
);

  localparam int unsigned NPAIR = K / 2;
  localparam bit          ODD   = (K % 2) == 1;
  // number of multipliers
  localparam int unsigned NM    = (FOLD == FOLD_NONE) ? K :
                                  (FOLD == FOLD_SYM)  ? NPAIR + (ODD ? 1 : 0) : NPAIR;
  // multiplicand width: one more bit after pre-addition
  localparam int unsigned MD_W  = (FOLD == FOLD_NONE) ? XW : XW + 1;
  localparam int unsigned MR_W  = even_up(HW);

  // ---- delay line ----
  logic [XW-1:0] r [K];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < K; i++) r[i] <= '0;
    end else begin
      r[0] <= x;
      for (int i = 1; i < K; i++) r[i] <= r[i-1];
    end
  end

  // ---- tap operands (pre-addition when folded) ----
  logic [MD_W-1:0] md [NM];
  logic [MR_W-1:0] mr [NM];
  for (genvar i = 0; i < NM; i++) begin : g_tap
    if (FOLD == FOLD_NONE) begin : g_plain
      assign md[i] = r[i];
    end else if (ODD && i == NPAIR) begin : g_centre
      assign md[i] = MD_W'(signed'(r[i]));   // only reached for FOLD_SYM
    end else if (FOLD == FOLD_SYM) begin : g_sym
      assign md[i] = MD_W'(signed'(r[i])) + MD_W'(signed'(r[K-1-i]));
    end else begin : g_anti
      assign md[i] = MD_W'(signed'(r[i])) - MD_W'(signed'(r[K-1-i]));
    end
    assign mr[i] = MR_W'(signed'(h[i]));
  end

  // ---- multipliers ----
  logic [PW-1:0]    prod [NM];
  logic [ACC_W-1:0] ops  [NM];
  for (genvar i = 0; i < NM; i++) begin : g_mul
    booth_mult #(.MD_W(MD_W), .MR_W(MR_W), .PW(PW)) u_mul (
      .md(md[i]), .mr(mr[i]), .p(prod[i])
    );
    assign ops[i] = ACC_W'(signed'(prod[i]));
  end

  // ---- carry-save summation and final addition ----
  logic [ACC_W-1:0] s_vec, c_vec;
  logic             unused_cout;
  csa_tree #(.N(NM), .W(ACC_W)) u_tree (.ops(ops), .sum_o(s_vec), .carry_o(c_vec));
  novel_csa #(.WIDTH(ACC_W)) u_final (
    .a(s_vec), .b(c_vec), .cin(1'b0), .sum(y), .cout(unused_cout)
  );

  // With folding the upper half of h is not used.
  if (NM < K) begin : g_unused
    logic [HW-1:0] unused_h [K-NM];
    for (genvar i = NM; i < K; i++) begin : g_u
      assign unused_h[i-NM] = h[i];
    end
  end

endmodule
