// tb_booth8_selector -- self-checking test of the radix-8 selection logic (N = 32).
// Digits are driven directly (every select code with both signs at every row
// position, then random), x3 is supplied as 3*x. Each row plus its correction bit
// must equal the signed multiple d*x*8^p modulo 2^64, and corr must hold only the
// sign bits at positions 3p.
module tb_booth8_selector;
  import booth8_pkg::*;

  localparam int N  = 32;
  localparam int P  = num_digits(N);
  localparam int PW = 2 * N;

  logic signed [N-1:0]  x;
  logic signed [N+1:0]  x3;
  booth_digit_t         digits [P];
  logic        [PW-1:0] rows [P];
  logic        [PW-1:0] corr;

  int checks = 0;
  int failures = 0;

  booth8_selector #(.N(N)) dut (.x(x), .x3(x3), .digits(digits), .rows(rows), .corr(corr));

  task automatic run_case();
    logic [PW-1:0] ecorr;
    #1;
    ecorr = '0;
    for (int p = 0; p < P; p++) begin
      logic [PW-1:0] got, exp;
      longint mag;
      mag = longint'(digits[p].sel);
      exp = PW'((digits[p].sign ? -mag : mag) * longint'(x)) << (3 * p);
      got = rows[p] + (PW'(corr[3*p]) << (3 * p));
      ecorr[3*p] = digits[p].sign;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL x=%0d row %0d sel %0d sign %b: %h exp %h", x, p, digits[p].sel,
                 digits[p].sign, got, exp);
      end
    end
    checks++;
    if (corr !== ecorr) begin
      failures++;
      $display("FAIL corr %h exp %h", corr, ecorr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_enc_e codes [5] = '{SEL_0X, SEL_1X, SEL_2X, SEL_3X, SEL_4X};
    for (int it = 0; it < 400; it++) begin
      x  = (it == 0) ? 32'sh8000_0000 : (it == 1) ? 32'sh7fff_ffff : $urandom;
      x3 = 3 * (N+2)'(x);
      for (int p = 0; p < P; p++) begin
        if (it < 10) begin
          digits[p].sel  = codes[(p + it) % 5];
          digits[p].sign = 1'((p + it / 5) % 2);
        end else begin
          digits[p].sel  = codes[$urandom_range(4)];
          digits[p].sign = 1'($urandom);
        end
      end
      run_case();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
