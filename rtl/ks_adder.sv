// ks_adder -- W-bit Kogge-Stone parallel-prefix adder.
//
// Bitwise generate/propagate signals are combined in log2(W) prefix levels; at
// level k every position i merges with position i - 2^k. The carry into bit i is
// the group generate of bits i-1..0 plus the group propagate times cin. The source
// names the Kogge-Stone structure for the datapath adders and triplers; using the
// same adder as the multiplier's final carry-propagate adder is this design's choice.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module ks_adder #(
  parameter int W = 32,
  localparam int LV = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W:0]   c;

  always_comb begin
    g[0] = a & b;
    p[0] = a ^ b;
    for (int k = 0; k < LV; k++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << k)) begin
          g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-(1<<k)]);
          p[k+1][i] = p[k][i] & p[k][i-(1<<k)];
        end else begin
          g[k+1][i] = g[k][i];
          p[k+1][i] = p[k][i];
        end
      end
    end
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      c[i+1] = g[LV][i] | (p[LV][i] & cin);
    end
  end

  assign sum  = p[0] ^ c[W-1:0];
  assign cout = c[W];

endmodule
