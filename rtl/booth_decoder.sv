// booth_decoder: partial-product generation for the radix-4 Booth multiplier.
//
// For Booth digit j, with the encoded signals {neg, two, one} from
// booth_encoder, it selects 0, X or 2X, shifts it left by 2j, sign-extends it
// to the product width WX+WY and, for a negative digit, takes the one's
// complement. The missing +1 of every negated row is collected in one extra
// correction row (bit 2j set when digit j is negative), so the rows
// pp[0..ND-1] plus pp[ND] add up, modulo 2^(WX+WY), to the signed product X*Y.
// The extra-row handling of the negation is this design's choice.
// Purely combinational.
module booth_decoder
  import rfir_pkg::*;
#(
  parameter int unsigned WX = 8,
  parameter int unsigned WY = 8
) (
  input  logic [WX-1:0]    x,
  input  booth_dig_t       dig [booth_digits(WY)],
  output logic [WX+WY-1:0] pp  [booth_digits(WY) + 1]
);

  localparam int unsigned ND = booth_digits(WY);
  localparam int unsigned PW = WX + WY;

  logic signed [PW-1:0] xe;  // multiplicand sign-extended to product width

  assign xe = PW'(signed'(x));

  always_comb begin
    pp[ND] = '0;
    for (int unsigned j = 0; j < ND; j++) begin
      logic [PW-1:0] mag;
      mag = dig[j].two ? (xe << 1) : dig[j].one ? xe : '0;
      mag = mag << (2 * j);
      pp[j] = dig[j].neg ? ~mag : mag;
      // one's complement of the zero bits below position 2j gives ones there;
      // clear them so that only the +1 at bit 2j is missing
      if (dig[j].neg) pp[j] = pp[j] & ({PW{1'b1}} << (2 * j));
      pp[ND][2*j] = dig[j].neg;
    end
  end

endmodule
