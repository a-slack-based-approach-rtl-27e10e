// tb_csa_tree -- self-checking test of the carry-save reduction tree.
// Three sizes (12 rows of 64 bits as in the 32-bit multiplier, 4 rows and 7 rows)
// are fed random and all-ones operands; the two outputs must add up to the sum of
// all inputs modulo 2^W.
module tb_csa_tree;
  logic [63:0] in12 [12];
  logic [63:0] s12, c12;
  logic [15:0] in4 [4];
  logic [15:0] s4, c4;
  logic [20:0] in7 [7];
  logic [20:0] s7, c7;

  int checks = 0;
  int failures = 0;

  csa_tree #(.K(12), .W(64)) dut12 (.in(in12), .sum_out(s12), .carry_out(c12));
  csa_tree #(.K(4),  .W(16)) dut4  (.in(in4),  .sum_out(s4),  .carry_out(c4));
  csa_tree #(.K(7),  .W(21)) dut7  (.in(in7),  .sum_out(s7),  .carry_out(c7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1500; it++) begin
      logic [63:0] e12;
      logic [15:0] e4;
      logic [20:0] e7;
      e12 = '0; e4 = '0; e7 = '0;
      for (int k = 0; k < 12; k++) begin
        in12[k] = (it == 0) ? '1 : {$urandom, $urandom};
        e12 += in12[k];
      end
      for (int k = 0; k < 4; k++) begin
        in4[k] = (it == 0) ? '1 : 16'($urandom);
        e4 += in4[k];
      end
      for (int k = 0; k < 7; k++) begin
        in7[k] = (it == 0) ? '1 : 21'($urandom);
        e7 += in7[k];
      end
      #1;
      checks += 3;
      if (s12 + c12 !== e12) begin failures++; $display("FAIL K=12 it %0d", it); end
      if (s4 + c4 !== e4)    begin failures++; $display("FAIL K=4 it %0d", it); end
      if (s7 + c7 !== e7)    begin failures++; $display("FAIL K=7 it %0d", it); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
