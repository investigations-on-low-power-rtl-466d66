// novel_csa: the modified ("novel") carry-save adder used for the final
// additions of the multipliers and sub-filters. It adds two WIDTH-bit words
// and a carry-in: {cout, sum} = a + b + cin, as unsigned numbers (the same
// bits are the correct two's-complement sum modulo 2**WIDTH).
//
// Structure, for the 16-bit adder of the document:
//   Row 1  bit 0 is a full adder (a0, b0, cin) that gives sum bit 0 directly;
//          bits 1..15 are half adders giving a propagate-sum p[i] and a
//          generate g[i].
//   Row 2  combines p[i] with g[i-1]. Bits 1..4 form a ripple group (a half
//          adder at bit 1, full adders at bits 2..4) that yields final sum
//          bits 1..4 and the group carry c4. Above that the row is cut into
//          3-bit groups starting at bits 5, 8, 11, 14. The first cell of each
//          group is a half adder because its carry-in is taken as zero; that
//          is where a full adder with a constant-zero input is replaced by a
//          half adder. The groups give intermediate bits x[i] and group carries
//          c7, c10, c13. A last half adder at bit 16 adds g[15] and c15.
//   Row 3  resolves the group carries: the carry out of each group is added
//          into the next group's x bits by a half-adder increment chain. A
//          group's carry-out is its own c or its increment carry (at most one
//          of the two can be set).
// This makes 21 half adders and 11 full adders in rows 1 and 2 at WIDTH=16,
// the count the document gives. The group layout, the cell types and the
// counts follow the document's figure; the row-3 carry resolution is this
// design's own completion, since the document shows only the group carries
// leaving rows 1 and 2.
// For other widths the same pattern is kept: a 5-bit first group, then 3-bit
// groups, the last one extended by the half adder at bit WIDTH.
// Purely combinational; WIDTH must be at least 6.
module novel_csa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // A group of row 2 begins at bit 5, 8, 11, ...
  function automatic bit group_start(int i);
    return (i >= 5) && ((i - 5) % 3 == 0);
  endfunction

  logic [WIDTH-1:0] p, g;     // row 1 sum and carry
  logic [WIDTH:0]   x;        // row 2 sum bits (bits 1..4 are final)
  logic [WIDTH:0]   c;        // row 2 carries
  logic [WIDTH:0]   t;        // row 3 increment carries
  logic [WIDTH:0]   r;        // row 3 results
  logic [WIDTH:0]   cin3;     // row 3 carry into each bit

  // ---- row 1 ----
  full_adder u_r1_0 (.a(a[0]), .b(b[0]), .ci(cin), .s(p[0]), .co(g[0]));
  for (genvar i = 1; i < WIDTH; i++) begin : g_row1
    half_adder u_ha (.a(a[i]), .b(b[i]), .s(p[i]), .c(g[i]));
  end

  // ---- row 2 ----
  assign x[0] = p[0];
  assign c[0] = 1'b0;
  for (genvar i = 1; i < WIDTH; i++) begin : g_row2
    if (i == 1 || group_start(i)) begin : g_h
      half_adder u_ha (.a(p[i]), .b(g[i-1]), .s(x[i]), .c(c[i]));
    end else begin : g_f
      full_adder u_fa (.a(p[i]), .b(g[i-1]), .ci(c[i-1]), .s(x[i]), .co(c[i]));
    end
  end
  half_adder u_r2_top (.a(g[WIDTH-1]), .b(c[WIDTH-1]), .s(x[WIDTH]), .c(c[WIDTH]));

  // ---- row 3: carry resolution between groups ----
  for (genvar i = 0; i <= WIDTH; i++) begin : g_row3
    if (i < 5) begin : g_low
      assign cin3[i] = 1'b0;
      assign t[i]    = 1'b0;
      assign r[i]    = x[i];
    end else begin : g_inc
      if (group_start(i)) begin : g_gs
        // carry out of the previous group: its own carry or its increment carry
        assign cin3[i] = c[i-1] | t[i-1];
      end else begin : g_in
        assign cin3[i] = t[i-1];
      end
      half_adder u_ha (.a(x[i]), .b(cin3[i]), .s(r[i]), .c(t[i]));
    end
  end

  assign sum  = r[WIDTH-1:0];
  // The exact total is below 2**(WIDTH+1), so bit WIDTH never overflows.
  assign cout = r[WIDTH] | c[WIDTH];

endmodule
