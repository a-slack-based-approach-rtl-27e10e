// tb_ks_adder -- self-checking test of the Kogge-Stone adder at two widths
// (32 bits and an odd 13 bits), against the built-in + operator, with carry in/out.
module tb_ks_adder;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  int checks = 0;
  int failures = 0;

  ks_adder #(.W(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  ks_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic chk(logic [31:0] a, logic [31:0] b, logic ci);
    logic [32:0] e32;
    logic [13:0] e13;
    a32 = a; b32 = b; ci32 = ci;
    a13 = a[12:0]; b13 = b[12:0]; ci13 = ci;
    #1;
    e32 = {1'b0, a} + {1'b0, b} + 33'(ci);
    e13 = {1'b0, a[12:0]} + {1'b0, b[12:0]} + 14'(ci);
    checks += 2;
    if ({co32, s32} !== e32) begin
      failures++;
      $display("FAIL32 %h+%h+%b = %h exp %h", a, b, ci, {co32, s32}, e32);
    end
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL13 %h+%h+%b = %h exp %h", a[12:0], b[12:0], ci, {co13, s13}, e13);
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
    chk('0, '0, 1'b0);
    chk('1, '0, 1'b1);
    chk('1, '1, 1'b1);
    chk(32'h8000_0000, 32'h8000_0000, 1'b0);
    chk(32'h5555_5555, 32'haaaa_aaab, 1'b0);
    for (int i = 0; i < 3000; i++) chk($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
