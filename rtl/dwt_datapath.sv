// dwt_datapath -- functional units, registers and operand routing of the DWT datapath.
//
// Executes whatever the control word of the current step says; the schedule itself
// lives in a controller. Functional units:
//   * 2 x booth8_mult  -- radix-8 Booth multipliers that take 3X as an operand,
//                         used as 3-cycle multicycle units (the controller holds the
//                         operand selects for 3 steps and loads on the third);
//                         the low W bits of the product are kept;
//   * 1 x ks_adder     -- W+2-bit Kogge-Stone adder, latency 1; adds two values, or
//                         in "triple" mode forms 2a + a and so acts as a second tripler;
//   * 1 x tripler      -- 3X = 2X + X, latency 1.
// Every operation result has its own W-bit value register and every 3X its own
// (W+2)-bit triple register, with load enable and asynchronous reset; registers are
// not shared between values. Each FU input is a multiplexer over the two input
// banks (in_cur, in_next, held by the enclosing unit) and the value registers.
//
// Arithmetic is W-bit two's complement with wrap-around. 3X values are exact
// (W+2 bits) so every multiplier sees the true 3X of its W-bit multiplicand.
//
// Interface: ctrl (control word of the current step), in_cur/in_next (input banks)
// in; result (value register 17) out. Registers update on the rising clock edge at
// the end of the step whose control word requested the load.
// The resource set and the latencies follow the published DWT example; the
// register organisation and the adder's triple mode are this design's choices.
module dwt_datapath
  import dwt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dwt_ctrl_t           ctrl,
  input  logic signed [W-1:0] in_cur  [NUM_IN],
  input  logic signed [W-1:0] in_next [NUM_IN],
  output logic signed [W-1:0] result
);

  logic signed [W-1:0] val_q [1:NUM_OPS];
  logic signed [W+1:0] x3_q  [1:NUM_OPS];

  // Operand routing: read an input register of either bank or a value register.
  function automatic logic signed [W-1:0] rd(src_t s,
                                             logic signed [W-1:0] cur  [NUM_IN],
                                             logic signed [W-1:0] nxt  [NUM_IN],
                                             logic signed [W-1:0] vals [1:NUM_OPS]);
    unique case (s.kind)
      SRC_VAL:  return (s.idx >= 5'd1 && s.idx <= idx_t'(NUM_OPS)) ? vals[s.idx] : '0;
      SRC_NEXT: return (s.idx < idx_t'(NUM_IN)) ? nxt[s.idx] : '0;
      default:  return (s.idx < idx_t'(NUM_IN)) ? cur[s.idx] : '0;
    endcase
  endfunction

  function automatic logic signed [W+1:0] rd_x3(idx_t i, logic signed [W+1:0] t [1:NUM_OPS]);
    return (i >= 5'd1 && i <= idx_t'(NUM_OPS)) ? t[i] : '0;
  endfunction

  // ---------------- multipliers ----------------
  logic signed [W-1:0]   mul_x  [NUM_MULS];
  logic signed [W-1:0]   mul_y  [NUM_MULS];
  logic signed [W+1:0]   mul_x3 [NUM_MULS];
  logic signed [2*W-1:0] mul_p  [NUM_MULS];

  for (genvar m = 0; m < NUM_MULS; m++) begin : g_mul
    always_comb begin
      mul_x[m]  = rd(ctrl.mul[m].x, in_cur, in_next, val_q);
      mul_y[m]  = rd(ctrl.mul[m].y, in_cur, in_next, val_q);
      mul_x3[m] = rd_x3(ctrl.mul[m].x3, x3_q);
    end

    booth8_mult #(.N(W)) u_mul (
      .x    (mul_x[m]),
      .x3   (mul_x3[m]),
      .y    (mul_y[m]),
      .prod (mul_p[m])
    );
  end

  // ---------------- adder (also usable as tripler) ----------------
  logic signed [W-1:0] add_a_w, add_b_w;
  logic        [W+1:0] add_a, add_b, add_s;
  logic                unused_add_cout;

  always_comb begin
    add_a_w = rd(ctrl.add.a, in_cur, in_next, val_q);
    add_b_w = rd(ctrl.add.b, in_cur, in_next, val_q);
    if (ctrl.add.mode == ADD_TRIPLE) begin
      add_a = {add_a_w[W-1], add_a_w, 1'b0};
      add_b = {{2{add_a_w[W-1]}}, add_a_w};
    end else begin
      add_a = {{2{add_a_w[W-1]}}, add_a_w};
      add_b = {{2{add_b_w[W-1]}}, add_b_w};
    end
  end

  ks_adder #(.W(W + 2)) u_add (
    .a    (add_a),
    .b    (add_b),
    .cin  (1'b0),
    .sum  (add_s),
    .cout (unused_add_cout)
  );

  // ---------------- tripler ----------------
  logic signed [W-1:0] trip_x;
  logic signed [W+1:0] trip_y;

  assign trip_x = rd(ctrl.trip.x, in_cur, in_next, val_q);

  tripler #(.N(W)) u_trip (
    .x  (trip_x),
    .x3 (trip_y)
  );

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= NUM_OPS; k++) val_q[k] <= '0;
      for (int k = 1; k <= NUM_OPS; k++) x3_q[k]  <= '0;
    end else begin
      for (int m = 0; m < NUM_MULS; m++) begin
        if (ctrl.mul[m].load) val_q[ctrl.mul[m].dest] <= mul_p[m][W-1:0];
      end
      if (ctrl.add.load) begin
        if (ctrl.add.mode == ADD_TRIPLE) x3_q[ctrl.add.dest]  <= signed'(add_s);
        else                             val_q[ctrl.add.dest] <= signed'(add_s[W-1:0]);
      end
      if (ctrl.trip.load) x3_q[ctrl.trip.dest] <= trip_y;
    end
  end

  assign result = val_q[RESULT_OP];

  // Two units never write the same register in one step.
  a_no_val_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.mul[0].load && ctrl.mul[1].load && ctrl.mul[0].dest == ctrl.mul[1].dest));
  a_no_x3_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.trip.load && ctrl.add.load && ctrl.add.mode == ADD_TRIPLE
      && ctrl.add.dest == ctrl.trip.dest));
  // A multiplier's operands are unchanged over the MUL_LAT steps before its load.
  for (genvar m = 0; m < NUM_MULS; m++) begin : g_mul_chk
    a_mul_hold: assert property (@(posedge clk) disable iff (!rst_n)
      ctrl.mul[m].load |-> $past(ctrl.mul[m].x, MUL_LAT - 1) == ctrl.mul[m].x
                        && $past(ctrl.mul[m].y, MUL_LAT - 1) == ctrl.mul[m].y);
  end

endmodule
