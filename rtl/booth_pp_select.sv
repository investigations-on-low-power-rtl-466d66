// booth_pp_select: partial-product selection of the signed-digit multiplier.
// Recodes a signed MR_W-bit multiplier (MR_W even) into MR_W/2 radix-4
// modified Booth digits. Digit j looks at multiplier bits 2j+1, 2j and 2j-1
// (bit -1 is zero) and has the value -2*y[2j+1] + y[2j] + y[2j-1].
// The document names the unit and uses modified Booth recoding; the digit
// encoding (neg, two, one) is this design's choice. Combinational.
module booth_pp_select
  import fir_pkg::*;
#(
  parameter int unsigned MR_W = 10
) (
  input  logic [MR_W-1:0] mr,                 // multiplier (coefficient)
  output booth_digit_t    digit [MR_W/2]      // one digit per bit pair
);

  logic [MR_W:0] ye;   // multiplier with the implicit zero below bit 0
  assign ye = {mr, 1'b0};

  for (genvar j = 0; j < MR_W / 2; j++) begin : g_dig
    logic b2, b1, b0;   // y[2j+1], y[2j], y[2j-1]
    assign b2 = ye[2*j+2];
    assign b1 = ye[2*j+1];
    assign b0 = ye[2*j];
    assign digit[j].neg = b2;
    assign digit[j].one = b1 ^ b0;
    assign digit[j].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
  end

endmodule
