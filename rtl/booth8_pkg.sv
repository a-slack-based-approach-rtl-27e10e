// booth8_pkg -- types and helpers shared by the radix-8 Booth multiplier.
//
// Radix-8 Booth recoding looks at overlapping four-bit groups ("Booth tuples")
// t_p = {y[3p+2], y[3p+1], y[3p], y[3p-1]} of the multiplier Y, with y[-1] = 0.
// Each tuple stands for the signed digit d_p = -4*y[3p+2] + 2*y[3p+1] + y[3p] + y[3p-1]
// in {-4..+4}, so that Y = sum_p d_p * 8^p. The hardware carries each digit as a
// magnitude select code (0X, 1X, 2X, 3X, 4X) plus a sign bit, exactly as in the
// radix-8 recoding truth table; -0X (tuple 1111) keeps its sign bit set.
// The number of digits for an n-bit multiplier is ceil((n+1)/3).
package booth8_pkg;

  // Magnitude select code ("Select Enc" of the recoding table).
  typedef enum logic [2:0] {
    SEL_0X = 3'b000,
    SEL_1X = 3'b001,
    SEL_2X = 3'b010,
    SEL_3X = 3'b011,
    SEL_4X = 3'b100
  } sel_enc_e;

  // One recoded Booth digit: magnitude select and sign (1 = negative).
  typedef struct packed {
    sel_enc_e sel;
    logic     sign;
  } booth_digit_t;

  // Number of radix-8 digits (partial-product rows) for an n-bit multiplier.
  function automatic int num_digits(int n);
    return (n + 1 + 2) / 3;
  endfunction

  // Recode one Booth tuple {y[3p+2], y[3p+1], y[3p], y[3p-1]}.
  function automatic booth_digit_t recode_tuple(logic [3:0] t);
    booth_digit_t d;
    d.sign = t[3];
    unique case (t)
      4'b0000, 4'b1111: d.sel = SEL_0X;
      4'b0001, 4'b0010,
      4'b1101, 4'b1110: d.sel = SEL_1X;
      4'b0011, 4'b0100,
      4'b1011, 4'b1100: d.sel = SEL_2X;
      4'b0101, 4'b0110,
      4'b1001, 4'b1010: d.sel = SEL_3X;
      4'b0111, 4'b1000: d.sel = SEL_4X;
      default:          d.sel = SEL_0X;
    endcase
    return d;
  endfunction

endpackage
