// sym_combine: the symmetric-coefficient butterfly of the fast FIR algorithm.
// Given the outputs of the two folded sub-filters
//   p = (Ha + Hb)(Xa + Xb)   (symmetric coefficients)
//   q = (Ha - Hb)(Xa - Xb)   (antisymmetric coefficients)
// it returns
//   s = (p + q) / 2 = Ha*Xa + Hb*Xb
//   d = (p - q) / 2 = Ha*Xb + Hb*Xa
// The division by two is exact because p + q and p - q are always even.
// Both sums are formed one bit wider in the modified carry-save adder
// (the subtraction as p + ~q + 1 through the carry-in) and then shifted.
// This is the document's combination step for two polyphase branches; it
// applies it to the 2-parallel filter, this design applies it to the two
// outer branches of the 3-parallel filter. Bit 0 of both widened sums is
// always zero and is dropped by the halving. Combinational; W >= 5.
module sym_combine #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] q,
  output logic [W-1:0] s,
  output logic [W-1:0] d
);

  logic [W:0] pe, qe, qn, sum_w, dif_w;
  logic       unused_c0, unused_c1;

  assign pe = {p[W-1], p};
  assign qe = {q[W-1], q};
  assign qn = ~qe;

  novel_csa #(.WIDTH(W + 1)) u_add (.a(pe), .b(qe), .cin(1'b0), .sum(sum_w), .cout(unused_c0));
  novel_csa #(.WIDTH(W + 1)) u_sub (.a(pe), .b(qn), .cin(1'b1), .sum(dif_w), .cout(unused_c1));

  assign s = sum_w[W:1];
  assign d = dif_w[W:1];

endmodule
