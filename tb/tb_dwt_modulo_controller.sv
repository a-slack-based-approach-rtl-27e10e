// tb_dwt_modulo_controller -- self-checking test of the overlapped DWT schedule.
//
// The testbench keeps its own copy of the DWT graph and tags every register write
// with the iteration it belongs to. Operations that write V1, V2, V3, T1, T3 or T6
// belong to the next iteration, all others to the current one; the current
// iteration advances whenever a period restarts at step 1. For each operation it
// checks the operands against the graph, that current-iteration operations read
// only the current input bank and next-iteration ones only the next bank, that
// every value and 3X read was written earlier by the same iteration, that products
// hold their operands for 3 steps, and that every iteration runs each of the 17
// operations exactly once. It also checks the handshake: in_ready only while idle
// or in step 8, a result pulse after step 14, a result every 15 cycles under a
// continuous stream, the prologue after idle, and a stop when no input is offered.
module tb_dwt_modulo_controller;
  import dwt_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic       in_ready, accept, swap, out_valid, busy;
  logic [4:0] cstep;
  dwt_ctrl_t  ctrl;

  int checks = 0;
  int failures = 0;

  dwt_modulo_controller dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                             .accept(accept), .swap(swap), .out_valid(out_valid), .busy(busy),
                             .cstep(cstep), .ctrl(ctrl));

  always #5 clk = ~clk;

  int ref_mul [1:17];
  int ref_a   [1:17];
  int ref_b   [1:17];

  int val_tag [1:17], val_cyc [1:17];
  int x3_tag  [1:17], x3_cyc  [1:17], x3_src [1:17];
  int runs [int];                 // key iteration*100 + op
  int mul_run [2], mul_first [2];
  int cyc = 0;
  int cur_iter = -1;              // iteration of the "current" operations
  int n_out = 0, last_out = -1, n_out_spaced = 0, n_prologue = 0, n_stop = 0, n_overlap = 0;

  task automatic set_op(int k, int m, int a, int b);
    ref_mul[k] = m; ref_a[k] = a; ref_b[k] = b;
  endtask

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d step %0d: %s", cyc, cstep, msg);
    end
  endtask

  function automatic bit is_prep_dest(int k);
    return k == 1 || k == 2 || k == 3;
  endfunction

  function automatic int s2i(src_t s);
    return (s.kind == SRC_VAL) ? 100 + int'(s.idx) : (s.kind == SRC_NEXT) ? 200 + int'(s.idx) : int'(s.idx);
  endfunction

  // Operand s read by an operation of iteration it, which began at cycle c0.
  task automatic chk_src(int s, int it, bit prep, int c0, string what);
    if (s >= 200) begin
      chk(prep, {what, ": next bank read by a current operation"});
    end else if (s >= 100) begin
      chk(val_tag[s - 100] == it && val_cyc[s - 100] < c0, {what, ": value not ready"});
    end else begin
      chk(!prep, {what, ": current bank read by a next operation"});
    end
  endtask

  function automatic int strip(int s);   // graph operand name: bank dropped
    return (s >= 200) ? s - 200 : s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      chk(!in_ready || !busy || cstep == 5'(PREP_ROW - 1), "in_ready outside step 8");
      if (busy && cstep == 5'd1) cur_iter++;
      // multipliers
      for (int m = 0; m < 2; m++) begin
        mul_ctrl_t mc;
        mc = ctrl.mul[m];
        if (mc.x != '0 || mc.y != '0 || mc.load) begin
          int k, it;
          bit prep;
          k = int'(mc.dest);
          prep = is_prep_dest(k);
          it = prep ? cur_iter + 1 : cur_iter;
          if (mul_run[m] == 0) mul_first[m] = cyc;
          mul_run[m]++;
          chk(ref_mul[k] == 1, "multiplier dest is a product");
          chk(strip(s2i(mc.x)) == ref_a[k] && strip(s2i(mc.y)) == ref_b[k], "product operands");
          chk_src(s2i(mc.x), it, prep, mul_first[m], "product x");
          chk_src(s2i(mc.y), it, prep, mul_first[m], "product y");
          chk(x3_tag[int'(mc.x3)] == it && x3_cyc[int'(mc.x3)] < mul_first[m]
              && x3_src[int'(mc.x3)] == ref_a[k], "3X of multiplicand ready");
          if (mc.load) begin
            chk(mul_run[m] == MUL_LAT, "product loads on its third step");
            runs[it * 100 + k]++;
            val_tag[k] = it; val_cyc[k] = cyc;
            mul_run[m] = 0;
          end
        end
      end
      if (ctrl.add.load) begin
        int k, a, b, it;
        bit prep;
        k = int'(ctrl.add.dest);
        a = s2i(ctrl.add.a);
        b = s2i(ctrl.add.b);
        prep = is_prep_dest(k);
        it = prep ? cur_iter + 1 : cur_iter;
        chk(ctrl.add.mode == ADD_SUM, "adder only sums in this schedule");
        chk(ref_mul[k] == 0, "adder dest is a sum");
        chk((strip(a) == ref_a[k] && strip(b) == ref_b[k]) || (strip(a) == ref_b[k] && strip(b) == ref_a[k]),
            "sum operands");
        chk_src(a, it, prep, cyc, "sum a");
        chk_src(b, it, prep, cyc, "sum b");
        runs[it * 100 + k]++;
        val_tag[k] = it; val_cyc[k] = cyc;
      end
      if (ctrl.trip.load) begin
        int k, a, it;
        bit prep;
        k = int'(ctrl.trip.dest);
        a = s2i(ctrl.trip.x);
        prep = (k == 1 || k == 3 || k == 6);
        it = prep ? cur_iter + 1 : cur_iter;
        chk_src(a, it, prep, cyc, "tripler x");
        x3_tag[k] = it; x3_cyc[k] = cyc; x3_src[k] = strip(a);
      end
      if (busy && cstep >= 5'd9 && dut.main_q && dut.prep_q) n_overlap++;
      if (out_valid) begin
        n_out++;
        chk(val_tag[17] == cur_iter && val_cyc[17] == cyc - 1, "result pulse follows the final sum");
        if (last_out >= 0 && cyc - last_out == II) n_out_spaced++;
        last_out = cyc;
      end
    end
  end

  initial begin
    #50000;
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
      val_tag[k] = -9; val_cyc[k] = 0; x3_tag[k] = -9; x3_cyc[k] = 0; x3_src[k] = -1;
    end
    mul_run = '{0, 0};
    mul_first = '{0, 0};
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // continuous stream of 4 sets: prologue, then 4 periods
    in_valid = 1'b1;
    n_prologue++;
    @(posedge clk);
    #1 chk(busy && cstep == 5'(PREP_ROW), "prologue starts at step 9");
    repeat (3) begin
      wait (cstep == 5'(PREP_ROW - 1));
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    wait (!busy);
    n_stop++;
    chk(n_out == 4, $sformatf("4 results, saw %0d", n_out));
    chk(n_out_spaced == 3, "results 15 cycles apart");
    // a second burst after idle
    @(posedge clk);
    #1 in_valid = 1'b1;
    n_prologue++;
    @(posedge clk);
    #1 in_valid = 1'b0;
    wait (!busy);
    chk(n_out == 5, "single set after idle gives one result");
    repeat (2) @(posedge clk);
    for (int it = 0; it <= cur_iter; it++)
      for (int k = 1; k <= 17; k++)
        chk(runs.exists(it * 100 + k) && runs[it * 100 + k] == 1,
            $sformatf("iteration %0d op %0d ran once", it, k));
    checks += 3;
    if (n_overlap == 0)  begin failures++; $display("FAIL no overlapped step"); end
    if (n_prologue == 0) begin failures++; $display("FAIL no prologue"); end
    if (n_stop == 0)     begin failures++; $display("FAIL no stop"); end
    $display("iterations=%0d results=%0d overlapped_steps=%0d", cur_iter + 1, n_out, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
