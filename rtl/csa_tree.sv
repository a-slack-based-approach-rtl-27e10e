// csa_tree -- partial-product reduction: K operands of W bits down to two.
//
// Wallace-style word-level tree. At every level the operands are taken in groups of
// three and each group passes through a row of full adders (3:2 carry-save adders),
// giving a sum word and a carry word shifted left by one; leftover operands (one or
// two) pass to the next level unchanged. The operand count therefore falls as
// c -> 2*floor(c/3) + c mod 3 until two remain. All arithmetic is modulo 2^W, so
// sum_out + carry_out == sum of all inputs (mod 2^W).
// The source names this stage and its job (reduce the partial-product matrix to
// two operands); the 3:2 Wallace arrangement is this design's choice.
//
// Interface: in[K] (W bits each) in; sum_out, carry_out (W bits) out. Combinational.
module csa_tree #(
  parameter int K = 12,
  parameter int W = 64
) (
  input  logic [W-1:0] in [K],
  output logic [W-1:0] sum_out,
  output logic [W-1:0] carry_out
);

  function automatic int next_cnt(int c);
    return (c <= 2) ? c : 2 * (c / 3) + (c % 3);
  endfunction

  function automatic int cnt_at(int k, int l);
    int c = k;
    for (int i = 0; i < l; i++) c = next_cnt(c);
    return c;
  endfunction

  function automatic int num_levels(int k);
    int c = k;
    int l = 0;
    while (c > 2) begin
      c = next_cnt(c);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels(K);
  localparam int CF     = cnt_at(K, LEVELS);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int C = cnt_at(K, l);
    logic [W-1:0] v [C];
    if (l == 0) begin : g_in
      assign v = in;
    end else begin : g_red
      localparam int CP = cnt_at(K, l - 1);
      localparam int NG = CP / 3;
      localparam int NR = CP % 3;
      always_comb begin
        for (int g = 0; g < NG; g++) begin
          logic [W-1:0] a, b, c;
          a = g_lvl[l-1].v[3*g];
          b = g_lvl[l-1].v[3*g+1];
          c = g_lvl[l-1].v[3*g+2];
          v[2*g]   = a ^ b ^ c;
          v[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
        end
        for (int r = 0; r < NR; r++) begin
          v[2*NG+r] = g_lvl[l-1].v[3*NG+r];
        end
      end
    end
  end

  assign sum_out = g_lvl[LEVELS].v[0];
  if (CF == 2) begin : g_two
    assign carry_out = g_lvl[LEVELS].v[1];
  end else begin : g_one
    assign carry_out = '0;
  end

endmodule
