// booth8_recoder -- radix-8 Booth recoder for an N-bit two's-complement multiplier.
//
// Y is sign-extended to 3*P bits (P = ceil((N+1)/3)) and a zero is appended below
// bit 0 (y[-1] = 0). Digit p is recoded from the four bits y[3p+2..3p-1] with the
// radix-8 truth table (booth8_pkg::recode_tuple), giving a three-bit magnitude select
// (0X..4X) and a sign bit. The table, the tuple layout and the digit count follow
// the radix-8 Booth recoding as published; sign-extending Y so that the same circuit
// serves signed operands is this design's choice.
//
// Interface: y (N bits) in, digits[P] out. Purely combinational, no clock.
module booth8_recoder
  import booth8_pkg::*;
#(
  parameter int N = 32,
  localparam int P = num_digits(N)
) (
  input  logic [N-1:0]  y,
  output booth_digit_t  digits [P]
);

  // {sign-extended y, y[-1] = 0}
  logic [3*P:0] yext;
  assign yext = {{(3*P-N){y[N-1]}}, y, 1'b0};

  always_comb begin
    for (int p = 0; p < P; p++) begin
      digits[p] = recode_tuple(yext[3*p +: 4]);
    end
  end

endmodule
