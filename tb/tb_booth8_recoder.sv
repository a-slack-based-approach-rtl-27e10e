// tb_booth8_recoder -- self-checking test of the radix-8 Booth recoder (N = 32).
//
// Every digit is compared with a reference copy of the radix-8 recoding table kept
// in this file (magnitude code and sign per tuple), and the digits are summed back:
// sum_p d_p * 8^p must equal the signed value of Y. Corner values plus random ones.
module tb_booth8_recoder;
  import booth8_pkg::*;

  localparam int N = 32;
  localparam int P = num_digits(N);

  logic [N-1:0] y;
  booth_digit_t digits [P];

  int checks = 0;
  int failures = 0;

  // Reference table: index = tuple {y3p+2, y3p+1, y3p, y3p-1}; {sel[2:0], sign}
  localparam logic [3:0] REF [16] = '{
    4'b000_0, 4'b001_0, 4'b001_0, 4'b010_0, 4'b010_0, 4'b011_0, 4'b011_0, 4'b100_0,
    4'b100_1, 4'b011_1, 4'b011_1, 4'b010_1, 4'b010_1, 4'b001_1, 4'b001_1, 4'b000_1
  };

  booth8_recoder #(.N(N)) dut (.y(y), .digits(digits));

  task automatic check_y(logic [N-1:0] v);
    logic [3*P:0] ext;
    longint acc;
    y = v;
    #1;
    ext = {{(3*P-N){v[N-1]}}, v, 1'b0};
    acc = 0;
    for (int p = 0; p < P; p++) begin
      logic [3:0] t;
      longint mag;
      t = ext[3*p +: 4];
      checks++;
      if ({digits[p].sel, digits[p].sign} !== REF[t]) begin
        failures++;
        $display("FAIL y=%h digit %0d tuple %b got %b%b exp %b", v, p, t,
                 digits[p].sel, digits[p].sign, REF[t]);
      end
      mag = longint'(digits[p].sel);
      acc += (digits[p].sign ? -mag : mag) <<< (3 * p);
    end
    checks++;
    if (acc != longint'(signed'(v))) begin
      failures++;
      $display("FAIL y=%h digit sum %0d", v, acc);
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
    check_y('0);
    check_y('1);
    check_y(32'h7fff_ffff);
    check_y(32'h8000_0000);
    check_y(32'h0000_0001);
    check_y(32'hb6db_6db6);
    check_y(32'h4924_9249);
    // every tuple value at digit position 1
    for (int t = 0; t < 16; t++) check_y(32'(t) << 2);
    for (int i = 0; i < 2000; i++) check_y($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
