// tb_dwt_controller -- self-checking test of the DWT schedule controller.
//
// The testbench keeps its own copy of the DWT dataflow graph (operands of each of
// the 17 operations) and watches the control words step by step. It checks that:
// every operation runs exactly once with the right operands; every operand was
// written in an earlier step; each product holds its operands for 3 steps and loads
// on the third; each multiplier's 3X register was filled with 3 times its
// multiplicand beforehand; busy lasts 19 steps and done follows step 19; a start
// during a run is ignored.
module tb_dwt_controller;
  import dwt_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      start;
  logic      busy, done;
  logic [4:0] cstep;
  dwt_ctrl_t ctrl;

  int checks = 0;
  int failures = 0;

  dwt_controller dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
                      .cstep(cstep), .ctrl(ctrl));

  always #5 clk = ~clk;

  // Sources as integers: input i -> i, value k -> 100 + k.
  function automatic int s2i(src_t s);
    return (s.kind == SRC_VAL) ? 100 + int'(s.idx) : (s.kind == SRC_NEXT) ? 200 + int'(s.idx) : int'(s.idx);
  endfunction

  // Reference DFG: op -> {is_mul, a, b}; for products a is the multiplicand.
  int ref_mul [1:17];
  int ref_a   [1:17];
  int ref_b   [1:17];

  int val_written [1:17];   // step in which value k was loaded (0 = not yet)
  int x3_written  [1:17];   // step in which triple register k was loaded
  int x3_source   [1:17];   // source tripled into triple register k
  int mul_run     [2];      // consecutive steps the multiplier held the same op
  int mul_first   [2];
  int op_count    [1:17];
  int busy_cycles;
  int done_seen;

  task automatic set_op(int k, int m, int a, int b);
    ref_mul[k] = m; ref_a[k] = a; ref_b[k] = b;
  endtask

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL step %0d: %s", cstep, msg);
    end
  endtask

  function automatic bit ready(int s, int step);
    if (s < 100) return 1'b1;
    return val_written[s - 100] != 0 && val_written[s - 100] < step;
  endfunction

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_op(1, 1, 0, 1);      set_op(3, 1, 2, 3);
    set_op(2, 0, 101, 4);    set_op(4, 0, 102, 103);
    set_op(5, 1, 5, 104);    set_op(6, 1, 6, 7);
    set_op(7, 0, 105, 8);    set_op(8, 0, 106, 9);
    set_op(9, 1, 108, 107);  set_op(10, 1, 10, 11);
    set_op(11, 0, 109, 12);  set_op(12, 0, 110, 13);
    set_op(13, 1, 112, 111); set_op(14, 1, 14, 15);
    set_op(15, 0, 113, 16);  set_op(16, 0, 114, 17);
    set_op(17, 0, 115, 116);
    for (int k = 1; k <= 17; k++) begin
      val_written[k] = 0; x3_written[k] = 0; x3_source[k] = -1; op_count[k] = 0;
    end
    mul_run = '{0, 0};
    mul_first = '{0, 0};
    busy_cycles = 0;
    done_seen = 0;

    rst_n = 1'b0;
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!busy && cstep == 0, "idle after reset");
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;

    while (busy) begin
      int step;
      step = int'(cstep);
      busy_cycles++;
      chk(step == busy_cycles, "step counts up by one");
      if (step == 9) start = 1'b1;     // ignored while busy
      if (step == 10) start = 1'b0;
      // multipliers
      for (int m = 0; m < 2; m++) begin
        mul_ctrl_t mc;
        int k;
        mc = ctrl.mul[m];
        k = int'(mc.dest);
        if (mc.x != '0 || mc.y != '0 || mc.load) begin
          if (mul_run[m] == 0) mul_first[m] = step;
          mul_run[m]++;
          chk(ref_mul[k] == 1, "multiplier dest is a product");
          chk(s2i(mc.x) == ref_a[k] && s2i(mc.y) == ref_b[k], "product operands");
          chk(ready(s2i(mc.x), mul_first[m]) && ready(s2i(mc.y), mul_first[m]),
              "product operands ready at first step");
          chk(x3_written[int'(mc.x3)] != 0 && x3_written[int'(mc.x3)] < mul_first[m]
              && x3_source[int'(mc.x3)] == ref_a[k], "3X of multiplicand ready");
          if (mc.load) begin
            chk(mul_run[m] == MUL_LAT, "product loads on its third step");
            op_count[k]++;
            val_written[k] = step;
            mul_run[m] = 0;
          end
        end
      end
      // adder
      if (ctrl.add.load) begin
        int k, a, b;
        k = int'(ctrl.add.dest);
        a = s2i(ctrl.add.a);
        b = s2i(ctrl.add.b);
        chk(ready(a, step) && ready(b, step), "adder operands ready");
        if (ctrl.add.mode == ADD_TRIPLE) begin
          x3_written[k] = step; x3_source[k] = a;
        end else begin
          chk(ref_mul[k] == 0, "adder dest is a sum");
          chk((a == ref_a[k] && b == ref_b[k]) || (a == ref_b[k] && b == ref_a[k]), "sum operands");
          op_count[k]++;
          val_written[k] = step;
        end
      end
      // tripler
      if (ctrl.trip.load) begin
        int k, a;
        k = int'(ctrl.trip.dest);
        a = s2i(ctrl.trip.x);
        chk(ready(a, step), "tripler operand ready");
        x3_written[k] = step; x3_source[k] = a;
      end
      @(posedge clk);
      #1;
      if (done) done_seen++;
    end
    chk(busy_cycles == CSTEPS, $sformatf("busy for %0d steps", busy_cycles));
    chk(done_seen == 1, "one done pulse right after the last step");
    for (int k = 1; k <= 17; k++) chk(op_count[k] == 1, $sformatf("op %0d ran once", k));
    chk(val_written[17] == CSTEPS, "result written in the last step");
    @(posedge clk);
    #1 chk(!done && !busy, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
