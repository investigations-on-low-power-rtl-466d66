// booth_mult: signed-digit multiplier. p = md * mr, both signed, the product
// taken modulo 2**PW (exact when it fits in PW signed bits; with the default
// 6-bit multiplicand and 10-bit multiplier it always does).
// Following the document's multiplier: a partial-product selection unit
// recodes the multiplier (the filter coefficient) into radix-4 Booth digits,
// a partial-product generator forms one row per digit, and the signed-digit
// adder sums the rows. Here that adder is a carry-save tree (rows plus one
// word of negation corrections) followed by the 16-bit modified carry-save
// adder for the final carry-propagate addition.
// Purely combinational. MR_W must be even.
module booth_mult
  import fir_pkg::*;
#(
  parameter int unsigned MD_W = 6,   // multiplicand (sample) width
  parameter int unsigned MR_W = 10,  // multiplier (coefficient) width, even
  parameter int unsigned PW   = 16   // product width
) (
  input  logic [MD_W-1:0] md,
  input  logic [MR_W-1:0] mr,
  output logic [PW-1:0]   p
);

  localparam int unsigned NPP = MR_W / 2;

  booth_digit_t  digit [NPP];
  logic [PW-1:0] ops   [NPP+1];
  logic [PW-1:0] corr  [NPP];
  logic [PW-1:0] corr_all;
  logic [PW-1:0] s_vec, c_vec;
  logic          unused_cout;

  booth_pp_select #(.MR_W(MR_W)) u_sel (.mr(mr), .digit(digit));

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    booth_pp_gen #(.MD_W(MD_W), .PW(PW), .POS(j)) u_gen (
      .md(md), .digit(digit[j]), .row(ops[j]), .corr(corr[j])
    );
  end

  // The correction bits sit at distinct positions 2j, so OR merges them.
  always_comb begin
    corr_all = '0;
    for (int j = 0; j < NPP; j++) corr_all |= corr[j];
  end
  assign ops[NPP] = corr_all;

  csa_tree #(.N(NPP + 1), .W(PW)) u_tree (.ops(ops), .sum_o(s_vec), .carry_o(c_vec));

  novel_csa #(.WIDTH(PW)) u_final (
    .a(s_vec), .b(c_vec), .cin(1'b0), .sum(p), .cout(unused_cout)
  );

  initial begin
    assert (MR_W % 2 == 0) else $error("booth_mult: MR_W must be even");
  end

endmodule
