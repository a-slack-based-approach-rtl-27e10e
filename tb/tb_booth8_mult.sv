// tb_booth8_mult -- self-checking test of the radix-8 Booth multiplier with external 3X.
// A 32-bit instance (default size) gets corner and random operands, an 8-bit instance
// is checked exhaustively (all 65536 pairs). In both, x3 = 3*x is computed here and
// the full signed product is compared with the built-in multiplication.
module tb_booth8_mult;
  logic signed [31:0] x32, y32;
  logic signed [33:0] t32;
  logic signed [63:0] p32;
  logic signed [7:0]  x8, y8;
  logic signed [9:0]  t8;
  logic signed [15:0] p8;

  int checks = 0;
  int failures = 0;

  booth8_mult #(.N(32)) dut32 (.x(x32), .x3(t32), .y(y32), .prod(p32));
  booth8_mult #(.N(8))  dut8  (.x(x8),  .x3(t8),  .y(y8),  .prod(p8));

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff,
                                         32'h8000_0000, 32'h5555_5555};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        x8 = 8'(a); y8 = 8'(b); t8 = 10'(3 * a);
        #1;
        checks++;
        if (int'(p8) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d*%0d = %0d", a, b, p8);
        end
      end
    end
    for (int i = 0; i < 3000; i++) begin
      longint e;
      x32 = (i < 36) ? CORNER[i % 6] : $urandom;
      y32 = (i < 36) ? CORNER[i / 6] : $urandom;
      t32 = 3 * 34'(x32);
      #1;
      e = longint'(x32) * longint'(y32);
      checks++;
      if (p32 != e) begin
        failures++;
        if (failures < 20) $display("FAIL32 %0d*%0d = %0d exp %0d", x32, y32, p32, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
