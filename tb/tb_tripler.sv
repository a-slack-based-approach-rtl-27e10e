// tb_tripler -- self-checking test of the Tripler (x3 = 3*x) at N = 32 and N = 8;
// the 8-bit instance is checked exhaustively, including the most negative input.
module tb_tripler;
  logic signed [31:0] x32;
  logic signed [33:0] y32;
  logic signed [7:0]  x8;
  logic signed [9:0]  y8;

  int checks = 0;
  int failures = 0;

  tripler #(.N(32)) dut32 (.x(x32), .x3(y32));
  tripler #(.N(8))  dut8  (.x(x8),  .x3(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x8 = 8'(v);
      #1;
      checks++;
      if (int'(y8) != 3 * v) begin
        failures++;
        $display("FAIL8 3*%0d = %0d", v, y8);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      longint e;
      x32 = (i == 0) ? 32'sh8000_0000 : (i == 1) ? 32'sh7fff_ffff : $urandom;
      #1;
      e = 3 * longint'(x32);
      checks++;
      if (longint'(y32) != e) begin
        failures++;
        $display("FAIL32 3*%0d = %0d", x32, y32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
