// tb_dwt_list_unit -- test of the one-pass DWT unit (19-step list schedule) at W = 32.
//
// Runs the 17-operation DWT graph many times on corner and random inputs and
// compares the result with a reference evaluation of the same graph in 32-bit
// wrap-around arithmetic. Checks the latency (done 19 cycles after the start edge),
// and that a start during a run is ignored. Counts how often each mechanism of the
// design occurred and fails if one never did: 3X on the tripler from a primary
// input, 3X on the tripler from an intermediate value, 3X on the adder in triple
// mode, a 3-cycle product load, a negative Booth digit that selects the external
// 3X multiple, back-to-back runs and an ignored start.
module tb_dwt_list_unit;
  import dwt_pkg::*;
  import booth8_pkg::*;

  localparam int W = 32;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                start;
  logic signed [W-1:0] in_data [NUM_IN];
  logic                busy, done;
  logic [4:0]          cstep;
  logic signed [W-1:0] result;

  int checks = 0;
  int failures = 0;

  int n_trip_in = 0, n_trip_val = 0, n_add_triple = 0, n_mul_load = 0;
  int n_neg3x = 0, n_back2back = 0, n_ignored_start = 0;

  dwt_list_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .in_data(in_data),
                      .busy(busy), .done(done), .cstep(cstep), .result(result));

  always #5 clk = ~clk;

  // mechanism counters, sampled on the control word
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (dut.ctrl.trip.load && !(dut.ctrl.trip.x.kind == SRC_VAL)) n_trip_in++;
      if (dut.ctrl.trip.load && (dut.ctrl.trip.x.kind == SRC_VAL))  n_trip_val++;
      if (dut.ctrl.add.load && dut.ctrl.add.mode == ADD_TRIPLE) n_add_triple++;
      for (int m = 0; m < NUM_MULS; m++) begin
        if (dut.ctrl.mul[m].load) begin
          n_mul_load++;
          // tuples 1001 and 1010 of the multiplier operand are Booth digit -3
          for (int p = 0; p < num_digits(W); p++) begin
            logic [3*11:0] ye;
            logic [3:0] t;
            ye = {dut.u_dp.mul_y[m][W-1], dut.u_dp.mul_y[m], 1'b0};
            t = ye[3*p +: 4];
            if (t == 4'b1001 || t == 4'b1010) n_neg3x++;
          end
        end
      end
    end
  end

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

  task automatic run_once(int kind, bit back_to_back, bit poke_start);
    logic signed [W-1:0] x [NUM_IN];
    logic [W-1:0] exp;
    int cycles;
    for (int i = 0; i < NUM_IN; i++) begin
      unique case (kind)
        0: x[i] = 32'sh8000_0000;
        1: x[i] = 32'sh7fff_ffff;
        2: x[i] = -32'sd1;
        3: x[i] = W'(i + 1);
        default: x[i] = $urandom;
      endcase
    end
    exp = ref_dwt(x);
    if (!back_to_back) @(posedge clk);
    #1;
    in_data = x;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    while (!done && cycles < 100) begin
      if (poke_start && cycles == 7) begin
        for (int i = 0; i < NUM_IN; i++) in_data[i] = $urandom;
        start = 1'b1;
      end
      if (poke_start && cycles == 8) start = 1'b0;
      @(posedge clk);
      #1;
      cycles++;
    end
    if (poke_start) n_ignored_start++;
    if (back_to_back) n_back2back++;
    checks++;
    if (cycles != CSTEPS) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, CSTEPS);
    end
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL kind %0d result %h expected %h", kind, result, exp);
    end
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
    start = 1'b0;
    for (int i = 0; i < NUM_IN; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 4; k++) run_once(k, 1'b0, 1'b0);
    run_once(4, 1'b0, 1'b1);
    for (int r = 0; r < 60; r++) run_once(4, r % 2 == 1, r % 7 == 3);
    checks += 7;
    if (n_trip_in == 0)       begin failures++; $display("FAIL no 3X of a primary input"); end
    if (n_trip_val == 0)      begin failures++; $display("FAIL no 3X of an intermediate value"); end
    if (n_add_triple == 0)    begin failures++; $display("FAIL adder never tripled"); end
    if (n_mul_load == 0)      begin failures++; $display("FAIL no product loaded"); end
    if (n_neg3x == 0)         begin failures++; $display("FAIL -3X never selected"); end
    if (n_back2back == 0)     begin failures++; $display("FAIL no back-to-back run"); end
    if (n_ignored_start == 0) begin failures++; $display("FAIL no start during a run"); end
    $display("mechanisms: trip_in=%0d trip_val=%0d add_triple=%0d mul_loads=%0d neg3x=%0d b2b=%0d ignored_start=%0d",
             n_trip_in, n_trip_val, n_add_triple, n_mul_load, n_neg3x, n_back2back, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
