// dwt_controller -- FSM controller for the DWT datapath with 3X precalculation.
//
// The schedule below is the list schedule of the DWT dataflow graph with two
// multipliers (latency 3), one adder and one tripler (latency 1), after a 3X node
// has been added in front of every product. It takes 19 control steps, one more
// than the same graph without 3X nodes, because the 3X of the multiplicands of the
// first two products (operations 1 and 3) must be computed before they can start.
// In step 1 both of these 3X values are formed: one on the tripler and one on the
// adder, which is otherwise idle in that step and is itself a 2a + a capable adder.
// The 3X chosen for products 9 and 13 is that of their sum operand 8 or 12 (the
// predecessor that leaves most slack); the other products triple a primary input.
//
//   step  mul0          mul1          adder             tripler
//   1                                 3*in0  -> T1      3*in2 -> T3
//   2-4   V1=in0*in1    V3=in2*in3
//   4                                                   3*in6 -> T6
//   5                   V6=in6*in7    V2=V1+in4
//   6                   (5-7)         V4=V2+V3          3*in5 -> T5
//   7-9   V5=in5*V4
//   8                                 V8=V6+in9         3*in10 -> T10
//   9-11                V10=in10*in11
//   10                                V7=V5+in8         3*V8 -> T9
//   11-13 V9=V8*V7
//   12                                V12=V10+in13      3*in14 -> T14
//   13-15               V14=in14*in15
//   14                                V11=V9+in12       3*V12 -> T13
//   15-17 V13=V12*V11
//   16                                V16=V14+in17
//   18                                V15=V13+in16
//   19                                V17=V15+V16
//
// A multiplier's operand selects stay constant over its three steps and its result
// register loads at the end of the third (a multicycle path through the
// combinational multiplier). The graph shape, the resource set, the latencies and
// the step of every operation follow the published DWT example; the names of the
// primary inputs, the binding of the step-1 3X to the adder and the handshake
// (start/busy/done) are this design's choices.
//
// Interface: start (pulse, accepted while idle) starts one run; busy is high during
// steps 1..19; done pulses for one cycle after step 19, when value register 17
// holds the result. cstep shows the current step (0 when idle).
module dwt_controller
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      busy,
  output logic      done,
  output logic [4:0] cstep,
  output dwt_ctrl_t ctrl
);

  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } state_e;

  state_e state_q;
  logic [4:0] step_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      step_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_RUN;
            step_q  <= 5'd1;
          end
        end
        S_RUN: begin
          if (step_q == 5'(CSTEPS)) begin
            state_q <= S_IDLE;
            step_q  <= '0;
            done    <= 1'b1;
          end else begin
            step_q <= step_q + 5'd1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state_q == S_RUN);
  assign cstep = step_q;

  // Multiplier 0 (left column of the schedule)
  always_comb begin
    ctrl.mul[0] = '0;
    case (step_q) inside
      [5'd2:5'd4]:   ctrl.mul[0] = mul_op(in_src(0),   in_src(1),   1,  1,  step_q == 5'd4);
      [5'd7:5'd9]:   ctrl.mul[0] = mul_op(in_src(5),   val_src(4),  5,  5,  step_q == 5'd9);
      [5'd11:5'd13]: ctrl.mul[0] = mul_op(val_src(8),  val_src(7),  9,  9,  step_q == 5'd13);
      [5'd15:5'd17]: ctrl.mul[0] = mul_op(val_src(12), val_src(11), 13, 13, step_q == 5'd17);
      default: ;
    endcase
  end

  // Multiplier 1 (right column of the schedule)
  always_comb begin
    ctrl.mul[1] = '0;
    case (step_q) inside
      [5'd2:5'd4]:   ctrl.mul[1] = mul_op(in_src(2),  in_src(3),  3,  3,  step_q == 5'd4);
      [5'd5:5'd7]:   ctrl.mul[1] = mul_op(in_src(6),  in_src(7),  6,  6,  step_q == 5'd7);
      [5'd9:5'd11]:  ctrl.mul[1] = mul_op(in_src(10), in_src(11), 10, 10, step_q == 5'd11);
      [5'd13:5'd15]: ctrl.mul[1] = mul_op(in_src(14), in_src(15), 14, 14, step_q == 5'd15);
      default: ;
    endcase
  end

  // Adder
  always_comb begin
    ctrl.add = '0;
    case (step_q)
      5'd1:  ctrl.add = add_triple(in_src(0), 1);
      5'd5:  ctrl.add = add_op(val_src(1),  in_src(4),   2);
      5'd6:  ctrl.add = add_op(val_src(2),  val_src(3),  4);
      5'd8:  ctrl.add = add_op(val_src(6),  in_src(9),   8);
      5'd10: ctrl.add = add_op(val_src(5),  in_src(8),   7);
      5'd12: ctrl.add = add_op(val_src(10), in_src(13),  12);
      5'd14: ctrl.add = add_op(val_src(9),  in_src(12),  11);
      5'd16: ctrl.add = add_op(val_src(14), in_src(17),  16);
      5'd18: ctrl.add = add_op(val_src(13), in_src(16),  15);
      5'd19: ctrl.add = add_op(val_src(15), val_src(16), 17);
      default: ;
    endcase
  end

  // Tripler
  always_comb begin
    ctrl.trip = '0;
    case (step_q)
      5'd1:  ctrl.trip = trip_op(in_src(2),   3);
      5'd4:  ctrl.trip = trip_op(in_src(6),   6);
      5'd6:  ctrl.trip = trip_op(in_src(5),   5);
      5'd8:  ctrl.trip = trip_op(in_src(10),  10);
      5'd10: ctrl.trip = trip_op(val_src(8),  9);
      5'd12: ctrl.trip = trip_op(in_src(14),  14);
      5'd14: ctrl.trip = trip_op(val_src(12), 13);
      default: ;
    endcase
  end

endmodule
