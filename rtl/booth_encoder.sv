// booth_encoder: radix-4 (modified) Booth recoding of a signed multiplier.
//
// The multiplier y is scanned in overlapping triplets (y[2j+1], y[2j], y[2j-1]),
// with y[-1] = 0, and every triplet becomes one digit in {-2,-1,0,+1,+2},
// following the Booth recoding table:
//   000, 111 -> 0     001, 010 -> +1    011 -> +2
//   100 -> -2         101, 110 -> -1
// so a WY-bit multiplier needs only ceil(WY/2) partial products. Each digit is
// given as the encoded signals {neg, two, one}; 111 is a zero digit with
// neg = 0. An odd WY is sign-extended by one bit (this design's choice).
// Purely combinational.
module booth_encoder
  import rfir_pkg::*;
#(
  parameter int unsigned WY = 8
) (
  input  logic [WY-1:0] y,
  output booth_dig_t    dig [booth_digits(WY)]
);

  localparam int unsigned ND = booth_digits(WY);

  logic [2*ND:0] ye;  // {sign extension, y, 0}

  assign ye = {{(2*ND + 1 - WY - 1){y[WY-1]}}, y, 1'b0};

  always_comb begin
    for (int unsigned j = 0; j < ND; j++) begin
      logic [2:0] t;
      t = ye[2*j +: 3];
      dig[j].one = t[1] ^ t[0];
      dig[j].two = (t == 3'b011) || (t == 3'b100);
      dig[j].neg = t[2] & ~(t[1] & t[0]);
    end
  end

endmodule
