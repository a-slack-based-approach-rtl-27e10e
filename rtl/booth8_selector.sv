// booth8_selector -- selection logic of the radix-8 Booth multiplier.
//
// For every Booth digit p it picks one of the multiples 0, X, 2X, 3X, 4X of the
// multiplicand, shifts it to weight 8^p and, for a negative digit, inverts it.
// The "+1" that completes each two's-complement negation is not added here; it is
// collected as bit 3p of the separate vector corr, which the reduction tree adds as
// one more row. The hard multiple 3X is NOT computed inside: it arrives already
// computed on input x3 (from a Tripler unit, earlier in the schedule), which is the
// point of this multiplier. 2X and 4X are wired shifts.
//
// Rows are full-width (2N bits, sign-extended); this design does not use the
// sign-extension-prevention tricks of optimised Booth arrays, which the source
// does not describe.
//
// Interface: x (N), x3 (N+2, must equal 3*x), digits[P] in; rows[P] and corr (2N) out.
// Combinational.
module booth8_selector
  import booth8_pkg::*;
#(
  parameter int N = 32,
  localparam int P  = num_digits(N),
  localparam int PW = 2 * N
) (
  input  logic signed [N-1:0]  x,
  input  logic signed [N+1:0]  x3,
  input  booth_digit_t         digits [P],
  output logic        [PW-1:0] rows [P],
  output logic        [PW-1:0] corr
);

  logic signed [PW-1:0] m1, m2, m3, m4;
  assign m1 = PW'(x);
  assign m2 = PW'(x) <<< 1;
  assign m3 = PW'(x3);
  assign m4 = PW'(x) <<< 2;

  always_comb begin
    corr = '0;
    for (int p = 0; p < P; p++) begin
      logic [PW-1:0] mag;
      unique case (digits[p].sel)
        SEL_1X:  mag = m1;
        SEL_2X:  mag = m2;
        SEL_3X:  mag = m3;
        SEL_4X:  mag = m4;
        default: mag = '0;
      endcase
      rows[p] = (mag ^ {PW{digits[p].sign}}) << (3 * p);
      corr[3*p] = digits[p].sign;
    end
  end

endmodule
