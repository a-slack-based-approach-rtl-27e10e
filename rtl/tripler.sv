// tripler -- Tripler functional unit: x3 = 3*x computed as 2x + x.
//
// This is the unit that takes the 3X multiple out of the radix-8 Booth multiplier
// and makes it an operation of its own in the dataflow graph. It is one carry-
// propagate addition of x shifted left by one and x itself, on a Kogge-Stone adder.
// The result is written to a register and later fed to a multiplier's x3 input.
// The source sizes it as an (N+1)-bit adder (the width of 2x); this design makes
// the adder N+2 bits wide so that the signed result 3x always fits without
// overflow (3 * -2^(N-1) needs N+2 bits).
//
// Interface: x (N bits, two's complement) in; x3 (N+2 bits) out. Combinational.
module tripler #(
  parameter int N = 32
) (
  input  logic signed [N-1:0] x,
  output logic signed [N+1:0] x3
);

  logic [N+1:0] twice, once, sum;
  logic         unused_cout;

  assign twice = {x[N-1], x, 1'b0};
  assign once  = {{2{x[N-1]}}, x};

  ks_adder #(.W(N + 2)) u_add (
    .a    (twice),
    .b    (once),
    .cin  (1'b0),
    .sum  (sum),
    .cout (unused_cout)
  );

  assign x3 = signed'(sum);

endmodule
