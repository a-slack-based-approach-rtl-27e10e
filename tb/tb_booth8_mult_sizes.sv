// tb_booth8_mult_sizes -- the radix-8 Booth multiplier at the operand widths
// 8, 16, 32, 64 and 128 bits. Each instance gets corner operands (0, +-1, most
// positive, most negative) and random ones; x3 = 3*x is formed here, and the full
// signed product is compared with a wide built-in multiplication.
module tb_booth8_mult_sizes;

  int checks = 0;
  int failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int finished = 0;

  for (genvar s = 0; s < 5; s++) begin : g_size
    localparam int N = 8 << s;
    logic signed [N-1:0]   x, y;
    logic signed [N+1:0]   x3;
    logic signed [2*N-1:0] p;

    booth8_mult #(.N(N)) dut (.x(x), .x3(x3), .y(y), .prod(p));

    function automatic logic [N-1:0] rnd();
      logic [N+31:0] r;
      r = '0;
      for (int i = 0; i < N; i += 32) r = (r << 32) | (N+32)'($urandom);
      return r[N-1:0];
    endfunction

    function automatic logic [N-1:0] corner(int c);
      unique case (c)
        0: return '0;
        1: return N'(1);
        2: return '1;
        3: return {1'b0, {(N-1){1'b1}}};
        default: return {1'b1, {(N-1){1'b0}}};
      endcase
    endfunction

    initial begin
      #(s * 10000 + 1);
      for (int i = 0; i < 1025; i++) begin
        logic signed [2*N-1:0] e;
        x = (i < 25) ? corner(i % 5) : rnd();
        y = (i < 25) ? corner(i / 5) : rnd();
        x3 = 3 * (N+2)'(x);
        #1;
        e = (2*N)'(x) * (2*N)'(y);
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d %h * %h = %h exp %h", N, x, y, p, e);
        end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
