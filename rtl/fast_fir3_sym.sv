// fast_fir3_sym: 3-parallel linear-phase FIR filter built with the fast FIR
// algorithm (FFA), symmetric-coefficient sub-filters, signed-digit (Booth)
// multipliers and modified carry-save adders.
//
// Function: y(n) = sum_{k=0}^{NTAPS-1} h(k) x(n-k) with a symmetric impulse
// response, h(k) = h(NTAPS-1-k). Three samples enter and three results leave
// on every clock:
//   x_in[i] = x(3m+i), y_out[i] = y(3m+i), i = 0, 1, 2.
//
// How it works. With Hj, Xj the polyphase components (Hj[i] = h(3i+j)) and
// "w" one block (clock) delay, the block outputs are
//   Y0 = A + w*F,   Y1 = E + w*B,   Y2 = C + D
// with A = H0X0, B = H2X2, C = H0X2 + H2X0, D = H1X1,
//      E = H0X1 + H1X0, F = H1X2 + H2X1.
// Six sub-filters of K = NTAPS/3 taps produce them:
//   S  = (H0+H2)(X0+X2)  symmetric coefficients, folded
//   T  = (H0-H2)(X0-X2)  antisymmetric coefficients, folded
//   D  =  H1 X1          symmetric coefficients, folded
//   A  =  H0 X0
//   M1 = (H0+H1)(X0+X1)
//   M2 = (H1+H2)(X1+X2)
// and the adders give A+B = (S+T)/2, C = (S-T)/2 (the symmetric butterfly,
// sym_combine), B = (A+B) - A, E = M1 - A - D, F = M2 - D - B.
// At NTAPS = 27 that is 5+4+5+9+9+9 = 41 multipliers instead of 81 for a
// plain 3-parallel filter. The block-level FFA equations are the standard
// 3-parallel ones; using the symmetric butterfly on the H0/H2 pair and
// folding the symmetric sub-filters is how this design applies the
// document's coefficient-symmetry idea to three branches, since the document
// writes the equations out only for two.
//
// Interface: coef[k] = h(k) for k = 0..NTAPS/2 (signed CW bits), to be held
// constant; x_in signed DW bits; y_out signed ACC_W bits, exact (the default
// 24 bits hold any 27-tap result of 4-bit samples and 8-bit coefficients).
// Timing: the block presented before clock edge t is taken into the
// sub-filter delay lines at edge t and its results appear on y_out after
// edge t+1: a latency of two clocks, three samples per clock.
// Reset (synchronous, active high) clears every delay line and output.
module fast_fir3_sym
  import fir_pkg::*;
#(
  parameter int unsigned NTAPS = NTAPS_DEF,
  parameter int unsigned DW    = DW_DEF,
  parameter int unsigned CW    = CW_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CW-1:0]    coef  [(NTAPS+1)/2],
  input  logic [DW-1:0]    x_in  [LPAR_DEF],
  output logic [ACC_W-1:0] y_out [LPAR_DEF]
);

  localparam int unsigned K = NTAPS / 3;
  localparam int unsigned L = LPAR_DEF;   // samples per clock

  // ---- coefficient sets ----
  logic [CW-1:0] c_h0 [K], c_h1 [K];
  logic [CW:0]   c_hs [K], c_ht [K], c_h01 [K], c_h12 [K];

  coef_precompute #(.NTAPS(NTAPS), .CW(CW)) u_coef (
    .coef(coef), .h0(c_h0), .h1(c_h1), .hs(c_hs), .ht(c_ht), .h01(c_h01), .h12(c_h12)
  );

  // ---- input pre-additions ----
  logic [DW:0] xs02, xt02, xs01, xs12;
  always_comb begin
    xs02 = {x_in[0][DW-1], x_in[0]} + {x_in[2][DW-1], x_in[2]};
    xt02 = {x_in[0][DW-1], x_in[0]} - {x_in[2][DW-1], x_in[2]};
    xs01 = {x_in[0][DW-1], x_in[0]} + {x_in[1][DW-1], x_in[1]};
    xs12 = {x_in[1][DW-1], x_in[1]} + {x_in[2][DW-1], x_in[2]};
  end

  // ---- sub-filters ----
  logic [ACC_W-1:0] y_s, y_t, y_a, y_d, y_m1, y_m2;

  sym_subfilter #(.K(K), .XW(DW+1), .HW(CW+1), .FOLD(FOLD_SYM),  .ACC_W(ACC_W))
    u_sf_s  (.clk(clk), .rst(rst), .x(xs02),    .h(c_hs),  .y(y_s));
  sym_subfilter #(.K(K), .XW(DW+1), .HW(CW+1), .FOLD(FOLD_ANTI), .ACC_W(ACC_W))
    u_sf_t  (.clk(clk), .rst(rst), .x(xt02),    .h(c_ht),  .y(y_t));
  sym_subfilter #(.K(K), .XW(DW),   .HW(CW),   .FOLD(FOLD_SYM),  .ACC_W(ACC_W))
    u_sf_h1 (.clk(clk), .rst(rst), .x(x_in[1]), .h(c_h1),  .y(y_d));
  sym_subfilter #(.K(K), .XW(DW),   .HW(CW),   .FOLD(FOLD_NONE), .ACC_W(ACC_W))
    u_sf_h0 (.clk(clk), .rst(rst), .x(x_in[0]), .h(c_h0),  .y(y_a));
  sym_subfilter #(.K(K), .XW(DW+1), .HW(CW+1), .FOLD(FOLD_NONE), .ACC_W(ACC_W))
    u_sf_01 (.clk(clk), .rst(rst), .x(xs01),    .h(c_h01), .y(y_m1));
  sym_subfilter #(.K(K), .XW(DW+1), .HW(CW+1), .FOLD(FOLD_NONE), .ACC_W(ACC_W))
    u_sf_12 (.clk(clk), .rst(rst), .x(xs12),    .h(c_h12), .y(y_m2));

  // ---- symmetric butterfly and post-additions ----
  logic [ACC_W-1:0] t_ab, t_c, t_b, t_e, t_f;
  sym_combine #(.W(ACC_W)) u_comb (.p(y_s), .q(y_t), .s(t_ab), .d(t_c));

  always_comb begin
    t_b = t_ab - y_a;
    t_e = y_m1 - y_a - y_d;
    t_f = y_m2 - y_d - t_b;
  end

  // ---- block delays and output registers ----
  logic [ACC_W-1:0] dly_b, dly_f;
  always_ff @(posedge clk) begin
    if (rst) begin
      dly_b <= '0;
      dly_f <= '0;
      for (int i = 0; i < L; i++) y_out[i] <= '0;
    end else begin
      dly_b    <= t_b;
      dly_f    <= t_f;
      y_out[0] <= y_a + dly_f;
      y_out[1] <= t_e + dly_b;
      y_out[2] <= t_c + y_d;
    end
  end

  initial begin
    assert (NTAPS % 3 == 0) else $error("fast_fir3_sym: NTAPS must be a multiple of 3");
  end

endmodule
