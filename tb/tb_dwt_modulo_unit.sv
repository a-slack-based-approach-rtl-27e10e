// tb_dwt_modulo_unit -- end-to-end test of the streaming DWT unit (overlapped
// 15-step schedule) at W = 32.
//
// A producer offers random input sets, sometimes back to back and sometimes with
// gaps; every result is compared, in order, with a reference evaluation of the
// graph in 32-bit wrap-around arithmetic. Checks that each result appears 21 cycles
// after its set was accepted and that, with no gaps, results are 15 cycles apart.
// Counts and requires: overlapped iterations (a swap of input banks), a prologue
// from idle, a stall (no set offered at step 8 while running), and a -3 Booth digit
// selecting the external 3X.
module tb_dwt_modulo_unit;
  import dwt_pkg::*;

  localparam int W = 32;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid, in_ready, out_valid, busy;
  logic signed [W-1:0] in_data [NUM_IN];
  logic [4:0]          cstep;
  logic signed [W-1:0] result;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  dwt_modulo_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                       .in_data(in_data), .out_valid(out_valid), .busy(busy), .cstep(cstep),
                       .result(result));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_dwt(logic signed [W-1:0] x [NUM_IN]);
    logic [W-1:0] v [1:17];
    v[1]  = x[0] * x[1];
    v[3]  = x[2] * x[3];
    v[2]  = v[1] + x[4];
    v[4]  = v[2] + v[3];
    v[5]  = x[5] * v[4];
    v[6]  = x[6] * x[7];
    v[7]  = v[5] + x[8];
    v[8]  = v[6] + x[9];
    v[9]  = v[8] * v[7];
    v[10] = x[10] * x[11];
    v[11] = v[9] + x[12];
    v[12] = v[10] + x[13];
    v[13] = v[12] * v[11];
    v[14] = x[14] * x[15];
    v[15] = v[13] + x[16];
    v[16] = v[14] + x[17];
    v[17] = v[15] + v[16];
    return v[17];
  endfunction

  logic [W-1:0] exp_q [$];
  int           acc_cyc_q [$];
  int n_sent = 0, n_recv = 0, n_spaced = 0, last_out = -1;
  int n_swap = 0, n_prologue = 0, n_stall = 0, n_neg3x = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (in_valid && in_ready) begin
        exp_q.push_back(ref_dwt(in_data));
        acc_cyc_q.push_back(cyc);
        if (!busy) n_prologue++;
      end
      if (busy && cstep == 5'(PREP_ROW - 1) && !in_valid) n_stall++;
      if (dut.swap) n_swap++;
      for (int m = 0; m < NUM_MULS; m++) begin
        if (dut.ctrl.mul[m].load) begin
          for (int p = 0; p < 11; p++) begin
            logic [33:0] ye;
            logic [3:0]  t;
            ye = {dut.u_dp.mul_y[m][W-1], dut.u_dp.mul_y[m], 1'b0};
            t = ye[3*p +: 4];
            if (t == 4'b1001 || t == 4'b1010) n_neg3x++;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL result without input");
      end else begin
        logic [W-1:0] e;
        int c0;
        e = exp_q.pop_front();
        c0 = acc_cyc_q.pop_front();
        if (result !== e) begin
          failures++;
          $display("FAIL result %0d: %h expected %h", n_recv, result, e);
        end
        checks++;
        if (cyc - c0 != 21) begin
          failures++;
          $display("FAIL result %0d latency %0d", n_recv, cyc - c0);
        end
      end
      if (last_out >= 0 && cyc - last_out == II) n_spaced++;
      last_out = cyc;
      n_recv++;
    end
  end

  task automatic offer(bit corner);
    for (int i = 0; i < NUM_IN; i++)
      in_data[i] = corner ? ((i % 2) ? 32'sh8000_0000 : -32'sd1) : $urandom;
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    n_sent++;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < NUM_IN; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    offer(1'b1);
    // continuous burst
    for (int i = 0; i < 10; i++) offer(1'b0);
    // bursts with gaps
    for (int i = 0; i < 30; i++) begin
      if ($urandom_range(3) == 0) repeat ($urandom_range(40, 1)) @(posedge clk);
      #1 offer(1'b0);
    end
    wait (!busy);
    repeat (3) @(posedge clk);
    checks += 6;
    if (n_recv != n_sent) begin failures++; $display("FAIL sent %0d received %0d", n_sent, n_recv); end
    if (n_spaced == 0)    begin failures++; $display("FAIL never 15 cycles between results"); end
    if (n_swap == 0)      begin failures++; $display("FAIL no overlapped iterations"); end
    if (n_prologue < 2)   begin failures++; $display("FAIL fewer than 2 prologues"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no stall"); end
    if (n_neg3x == 0)     begin failures++; $display("FAIL -3X never selected"); end
    $display("sets=%0d results=%0d spaced15=%0d swaps=%0d prologues=%0d stalls=%0d neg3x=%0d",
             n_sent, n_recv, n_spaced, n_swap, n_prologue, n_stall, n_neg3x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
