// booth8_mult -- radix-8 Booth multiplier with the 3X multiple supplied from outside.
//
// A conventional radix-8 Booth multiplier must form the hard multiple 3X = 2X + X
// with a carry-propagate addition before any partial product can be selected, which
// puts a full adder delay in front of the array. This multiplier instead takes 3X
// as an operand (x3), computed earlier by a separate Tripler unit while the
// schedule has slack, so its critical path is recoder -> selection -> reduction ->
// final adder only, with the partial-product height cut from ceil((N+1)/2) rows
// (radix 4) to ceil((N+1)/3) rows.
//
// Structure: booth8_recoder (Y -> P digits), booth8_selector (P rows plus a row of
// negation "+1" bits), csa_tree (P+1 rows -> 2), ks_adder (final carry-propagate add).
// Operands are two's complement; the product is the full 2N-bit signed product.
// x3 must equal 3*x (N+2 bits); any other value gives a wrong product.
//
// Interface: x, y (N bits), x3 (N+2 bits) in; prod (2N bits) out. Combinational:
// in the datapath it is used as a multicycle unit whose result is captured after
// three clock cycles, as in the scheduling examples the design is built for.
module booth8_mult
  import booth8_pkg::*;
#(
  parameter int N = 32,
  localparam int P  = num_digits(N),
  localparam int PW = 2 * N
) (
  input  logic signed [N-1:0]  x,
  input  logic signed [N+1:0]  x3,
  input  logic signed [N-1:0]  y,
  output logic signed [PW-1:0] prod
);

  booth_digit_t  digits [P];
  logic [PW-1:0] rows   [P];
  logic [PW-1:0] corr;
  logic [PW-1:0] ppm    [P+1];
  logic [PW-1:0] red_sum, red_carry;
  logic [PW-1:0] sum;
  logic          unused_cout;

  booth8_recoder #(.N(N)) u_recoder (
    .y      (y),
    .digits (digits)
  );

  booth8_selector #(.N(N)) u_selector (
    .x      (x),
    .x3     (x3),
    .digits (digits),
    .rows   (rows),
    .corr   (corr)
  );

  always_comb begin
    for (int p = 0; p < P; p++) ppm[p] = rows[p];
    ppm[P] = corr;
  end

  csa_tree #(.K(P + 1), .W(PW)) u_reduce (
    .in        (ppm),
    .sum_out   (red_sum),
    .carry_out (red_carry)
  );

  ks_adder #(.W(PW)) u_cpa (
    .a    (red_sum),
    .b    (red_carry),
    .cin  (1'b0),
    .sum  (sum),
    .cout (unused_cout)
  );

  assign prod = signed'(sum);

endmodule
