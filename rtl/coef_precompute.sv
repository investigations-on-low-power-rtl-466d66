// coef_precompute: sub-filter coefficient sets of the 3-parallel
// linear-phase filter.
// The filter's impulse response h(0..NTAPS-1) is symmetric,
// h(k) = h(NTAPS-1-k), so only its first NH = ceil(NTAPS/2) values are
// inputs. Its three polyphase components (K = NTAPS/3 taps each) are
//   H0[i] = h(3i),  H1[i] = h(3i+1),  H2[i] = h(3i+2).
// Symmetry makes H2 the reverse of H0 and H1 symmetric in itself.
// The module outputs the six coefficient sets the sub-filters use:
//   h0  = H0        h1  = H1
//   hs  = H0 + H2   (symmetric)      ht  = H0 - H2  (antisymmetric)
//   h01 = H0 + H1   h12 = H1 + H2
// The sums and differences are one bit wider than a coefficient.
// Purely combinational; the coefficients are meant to be held constant.
module coef_precompute #(
  parameter int unsigned NTAPS = 27,
  parameter int unsigned CW    = 8
) (
  input  logic [CW-1:0] coef [(NTAPS+1)/2],
  output logic [CW-1:0] h0   [NTAPS/3],
  output logic [CW-1:0] h1   [NTAPS/3],
  output logic [CW:0]   hs   [NTAPS/3],
  output logic [CW:0]   ht   [NTAPS/3],
  output logic [CW:0]   h01  [NTAPS/3],
  output logic [CW:0]   h12  [NTAPS/3]
);

  localparam int unsigned NH = (NTAPS + 1) / 2;
  localparam int unsigned K  = NTAPS / 3;

  // full impulse response from its unique half
  logic [CW-1:0] hf [NTAPS];
  for (genvar k = 0; k < NTAPS; k++) begin : g_full
    if (k < NH) begin : g_lo
      assign hf[k] = coef[k];
    end else begin : g_hi
      assign hf[k] = coef[NTAPS-1-k];
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_set
    logic [CW:0] e0, e1, e2;
    assign e0     = {hf[3*i][CW-1],   hf[3*i]};
    assign e1     = {hf[3*i+1][CW-1], hf[3*i+1]};
    assign e2     = {hf[3*i+2][CW-1], hf[3*i+2]};
    assign h0[i]  = hf[3*i];
    assign h1[i]  = hf[3*i+1];
    assign hs[i]  = e0 + e2;
    assign ht[i]  = e0 - e2;
    assign h01[i] = e0 + e1;
    assign h12[i] = e1 + e2;
  end

  initial begin
    assert (NTAPS % 3 == 0) else $error("coef_precompute: NTAPS must be a multiple of 3");
  end

endmodule
