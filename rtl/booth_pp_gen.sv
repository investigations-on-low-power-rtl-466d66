// booth_pp_gen: partial-product generator of the signed-digit multiplier.
// For one Booth digit d and the signed multiplicand M it forms the row
// (d * M) << (2 * POS) modulo 2**PW, in the usual one's-complement form:
// the row holds ~(|d| * M) when d is negative, and the missing +1 is given
// separately as `corr` (already at bit 2*POS) so that the adder tree adds it.
// The document names the unit; the one's-complement row with a separate
// correction bit is this design's choice. Combinational.
module booth_pp_gen
  import fir_pkg::*;
#(
  parameter int unsigned MD_W = 6,   // multiplicand width, signed
  parameter int unsigned PW   = 16,  // row width
  parameter int unsigned POS  = 0    // digit index: the row is shifted by 2*POS
) (
  input  logic [MD_W-1:0] md,
  input  booth_digit_t    digit,
  output logic [PW-1:0]   row,
  output logic [PW-1:0]   corr
);

  logic [PW-1:0] m1, mag, sel;

  always_comb begin
    m1   = PW'(signed'(md));                       // sign-extended M
    mag  = digit.two ? (m1 << 1) : (digit.one ? m1 : '0);
    sel  = digit.neg ? ~mag : mag;
    row  = sel << (2 * POS);
    corr = PW'(digit.neg) << (2 * POS);
  end

endmodule
