// tb_booth8_dwt_top -- end-to-end test of the top at its default width (W = 32):
// the one-pass unit (19-step list schedule) and the streaming unit (15-step
// overlapped schedule) are driven at the same time with random and corner input
// sets, and every result is compared with a reference evaluation of the DWT graph.
// Checks the one-pass latency (19 cycles), the streaming latency (21 cycles) and
// the 15-cycle spacing of streamed results. Counts and requires: 3X of a primary
// input and of an intermediate value on the tripler, the adder's triple mode,
// 3-cycle product loads, a -3 digit selecting the external 3X, overlapped
// iterations and a stream stall.
module tb_booth8_dwt_top;
  import dwt_pkg::*;

  localparam int W = 32;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                list_start, list_busy, list_done;
  logic signed [W-1:0] list_in_data [NUM_IN];
  logic [4:0]          list_cstep, mod_cstep;
  logic signed [W-1:0] list_result, mod_result;
  logic                mod_in_valid, mod_in_ready, mod_out_valid, mod_busy;
  logic signed [W-1:0] mod_in_data [NUM_IN];

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  booth8_dwt_top dut (
    .clk(clk), .rst_n(rst_n),
    .list_start(list_start), .list_in_data(list_in_data), .list_busy(list_busy),
    .list_done(list_done), .list_cstep(list_cstep), .list_result(list_result),
    .mod_in_valid(mod_in_valid), .mod_in_ready(mod_in_ready), .mod_in_data(mod_in_data),
    .mod_out_valid(mod_out_valid), .mod_busy(mod_busy), .mod_cstep(mod_cstep),
    .mod_result(mod_result));

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

  function automatic int neg3_digits(logic [W-1:0] y);
    logic [33:0] ye;
    int n = 0;
    ye = {y[W-1], y, 1'b0};
    for (int p = 0; p < 11; p++)
      if (ye[3*p +: 4] == 4'b1001 || ye[3*p +: 4] == 4'b1010) n++;
    return n;
  endfunction

  int n_trip_in = 0, n_trip_val = 0, n_add_triple = 0, n_mul_load = 0, n_neg3x = 0;
  int n_swap = 0, n_stall = 0, n_list = 0, n_mod = 0, n_spaced = 0, last_mod = -1;
  logic [W-1:0] mod_exp_q [$];
  int           mod_acc_q [$];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int u = 0; u < 2; u++) begin
        dwt_ctrl_t c;
        c = (u == 0) ? dut.u_list.ctrl : dut.u_mod.ctrl;
        if (c.trip.load && c.trip.x.kind != SRC_VAL) n_trip_in++;
        if (c.trip.load && c.trip.x.kind == SRC_VAL) n_trip_val++;
        if (c.add.load && c.add.mode == ADD_TRIPLE) n_add_triple++;
        for (int m = 0; m < NUM_MULS; m++) begin
          if (c.mul[m].load) begin
            n_mul_load++;
            n_neg3x += neg3_digits((u == 0) ? dut.u_list.u_dp.mul_y[m] : dut.u_mod.u_dp.mul_y[m]);
          end
        end
      end
      if (dut.u_mod.swap) n_swap++;
      if (mod_busy && mod_cstep == 5'(PREP_ROW - 1) && !mod_in_valid) n_stall++;
      if (mod_in_valid && mod_in_ready) begin
        mod_exp_q.push_back(ref_dwt(mod_in_data));
        mod_acc_q.push_back(cyc);
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && mod_out_valid) begin
      logic [W-1:0] e;
      int c0;
      checks += 2;
      e = (mod_exp_q.size() > 0) ? mod_exp_q.pop_front() : '0;
      c0 = (mod_acc_q.size() > 0) ? mod_acc_q.pop_front() : -100;
      if (mod_result !== e) begin
        failures++;
        $display("FAIL stream result %0d: %h expected %h", n_mod, mod_result, e);
      end
      if (cyc - c0 != 21) begin
        failures++;
        $display("FAIL stream latency %0d", cyc - c0);
      end
      if (last_mod >= 0 && cyc - last_mod == II) n_spaced++;
      last_mod = cyc;
      n_mod++;
    end
  end

  task automatic list_run(int kind);
    logic [W-1:0] e;
    int n;
    @(posedge clk);
    #1;
    for (int i = 0; i < NUM_IN; i++)
      list_in_data[i] = (kind == 0) ? 32'sh8000_0000 : (kind == 1) ? 32'sh7fff_ffff : $urandom;
    e = ref_dwt(list_in_data);
    list_start = 1'b1;
    @(posedge clk);
    #1 list_start = 1'b0;
    n = 0;
    while (!list_done && n < 100) begin
      @(posedge clk);
      #1 n++;
    end
    checks += 2;
    if (n != CSTEPS) begin
      failures++;
      $display("FAIL list latency %0d", n);
    end
    if (list_result !== e) begin
      failures++;
      $display("FAIL list result %h expected %h", list_result, e);
    end
    n_list++;
  endtask

  task automatic mod_offer(int kind);
    for (int i = 0; i < NUM_IN; i++)
      mod_in_data[i] = (kind == 0) ? -32'sd1 : (kind == 1) ? 32'sh8000_0000 : $urandom;
    mod_in_valid = 1'b1;
    do @(posedge clk); while (!mod_in_ready);
    #1 mod_in_valid = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    list_start = 1'b0;
    mod_in_valid = 1'b0;
    for (int i = 0; i < NUM_IN; i++) begin
      list_in_data[i] = '0;
      mod_in_data[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      for (int r = 0; r < 12; r++) list_run(r);
      begin
        for (int r = 0; r < 8; r++) mod_offer(r);
        repeat (20) @(posedge clk);
        #1;
        for (int r = 0; r < 4; r++) mod_offer(2);
      end
    join
    wait (!mod_busy && !list_busy);
    repeat (3) @(posedge clk);
    checks += 9;
    if (n_mod != 12)       begin failures++; $display("FAIL %0d stream results", n_mod); end
    if (n_trip_in == 0)    begin failures++; $display("FAIL no 3X of a primary input"); end
    if (n_trip_val == 0)   begin failures++; $display("FAIL no 3X of an intermediate value"); end
    if (n_add_triple == 0) begin failures++; $display("FAIL adder never tripled"); end
    if (n_mul_load == 0)   begin failures++; $display("FAIL no product loaded"); end
    if (n_neg3x == 0)      begin failures++; $display("FAIL -3X never selected"); end
    if (n_swap == 0)       begin failures++; $display("FAIL no overlapped iterations"); end
    if (n_stall == 0)      begin failures++; $display("FAIL no stream stall"); end
    if (n_spaced == 0)     begin failures++; $display("FAIL stream never at full rate"); end
    $display("list_runs=%0d stream_results=%0d trip_in=%0d trip_val=%0d add_triple=%0d mul_loads=%0d neg3x=%0d swaps=%0d stalls=%0d spaced15=%0d",
             n_list, n_mod, n_trip_in, n_trip_val, n_add_triple, n_mul_load, n_neg3x, n_swap, n_stall, n_spaced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
