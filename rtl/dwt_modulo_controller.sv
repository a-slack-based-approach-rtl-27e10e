// dwt_modulo_controller -- overlapped (modulo) schedule of the DWT graph, 15 steps
// per iteration.
//
// In the 19-step list schedule the first step only computes the 3X of the first
// two multiplicands. Here that work, and the whole chain in front of sum 4
// (products 1 and 3, sum 2, and the 3X of products 1, 3 and 6), is done for the
// NEXT iteration in steps 9..15 of the current one, in slots the current iteration
// leaves free. A new iteration then starts every 15 steps on the same resources
// (2 multipliers, 1 adder, 1 tripler). Rows of the table below are the steps of one
// period; "next" operations read the next-iteration input bank.
//
//   step  mul0            mul1             adder            tripler
//   1                     V6=in6*in7 (1-3) V4=V2+V3         T5=3*in5
//   2-4   V5=in5*V4 (2-4)                                   T10=3*in10 (3)
//   4                     V10=in10*in11    V8=V6+in9
//   5                     (4-6)            V7=V5+in8        T9=3*V8
//   6-8   V9=V8*V7                                          T14=3*in14 (6)
//   7                     V14=in14*in15    V12=V10+in13
//   8                     (7-9)                             T13=3*V12
//   9                                      V11=V9+in12      next T1=3*in0
//   10-12 V13=V12*V11     next V1=in0*in1
//   11                                     V16=V14+in17
//   12                                                      next T3=3*in2
//   13-15 next V3=in2*in3                  V15=V13+in16 (13)
//   14                                     V17=V15+V16      next T6=3*in6
//   15                                     next V2=V1+in4
//
// Sequencing: "main" operations (those of the current iteration) run when a
// current iteration exists; "next" operations run when a next input set was taken
// in. A set is accepted (in_valid && in_ready) while idle, which starts a prologue
// that runs only steps 9..15, or in step 8 of a running period. At the end of step
// 15 the next set becomes the current one (swap) and a new period starts; with no
// next set the unit goes idle. out_valid pulses after step 14 of every period that
// ran a current iteration: a result every 15 cycles under a continuous stream, 21
// cycles after the set was accepted.
// The slot of every operation follows the published modulo schedule of the DWT
// example; the valid/ready handshake, the prologue and the stop when no input is
// waiting are this design's choices.
module dwt_modulo_controller
  import dwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       accept,
  output logic       swap,
  output logic       out_valid,
  output logic       busy,
  output logic [4:0] cstep,
  output dwt_ctrl_t  ctrl
);

  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } state_e;

  state_e     state_q;
  logic [4:0] row_q;
  logic       main_q;   // steps of the current iteration are active
  logic       prep_q;   // steps of the next iteration are active

  assign in_ready = (state_q == S_IDLE) || (row_q == 5'(PREP_ROW - 1));
  assign accept   = in_valid && in_ready;
  assign swap     = (state_q == S_RUN) && (row_q == 5'(II)) && prep_q;
  assign busy     = (state_q == S_RUN);
  assign cstep    = row_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      row_q     <= '0;
      main_q    <= 1'b0;
      prep_q    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= (state_q == S_RUN) && main_q && (row_q == 5'd14);
      unique case (state_q)
        S_IDLE: begin
          if (accept) begin
            state_q <= S_RUN;
            row_q   <= 5'(PREP_ROW);
            main_q  <= 1'b0;
            prep_q  <= 1'b1;
          end
        end
        S_RUN: begin
          if (row_q == 5'(PREP_ROW - 1)) prep_q <= accept;
          if (row_q == 5'(II)) begin
            main_q <= prep_q;
            prep_q <= 1'b0;
            if (prep_q) begin
              row_q <= 5'd1;
            end else begin
              state_q <= S_IDLE;
              row_q   <= '0;
            end
          end else begin
            row_q <= row_q + 5'd1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  logic run_main, run_prep;
  assign run_main = (state_q == S_RUN) && main_q;
  assign run_prep = (state_q == S_RUN) && prep_q;

  // Multiplier 0
  always_comb begin
    ctrl.mul[0] = '0;
    if (run_main) begin
      case (row_q) inside
        [5'd2:5'd4]:   ctrl.mul[0] = mul_op(in_src(5),   val_src(4),  5,  5,  row_q == 5'd4);
        [5'd6:5'd8]:   ctrl.mul[0] = mul_op(val_src(8),  val_src(7),  9,  9,  row_q == 5'd8);
        [5'd10:5'd12]: ctrl.mul[0] = mul_op(val_src(12), val_src(11), 13, 13, row_q == 5'd12);
        default: ;
      endcase
    end
    if (run_prep && row_q >= 5'd13 && row_q <= 5'd15) begin
      ctrl.mul[0] = mul_op(next_src(2), next_src(3), 3, 3, row_q == 5'd15);
    end
  end

  // Multiplier 1
  always_comb begin
    ctrl.mul[1] = '0;
    if (run_main) begin
      case (row_q) inside
        [5'd1:5'd3]: ctrl.mul[1] = mul_op(in_src(6),  in_src(7),  6,  6,  row_q == 5'd3);
        [5'd4:5'd6]: ctrl.mul[1] = mul_op(in_src(10), in_src(11), 10, 10, row_q == 5'd6);
        [5'd7:5'd9]: ctrl.mul[1] = mul_op(in_src(14), in_src(15), 14, 14, row_q == 5'd9);
        default: ;
      endcase
    end
    if (run_prep && row_q >= 5'd10 && row_q <= 5'd12) begin
      ctrl.mul[1] = mul_op(next_src(0), next_src(1), 1, 1, row_q == 5'd12);
    end
  end

  // Adder
  always_comb begin
    ctrl.add = '0;
    if (run_main) begin
      case (row_q)
        5'd1:  ctrl.add = add_op(val_src(2),  val_src(3),  4);
        5'd4:  ctrl.add = add_op(val_src(6),  in_src(9),   8);
        5'd5:  ctrl.add = add_op(val_src(5),  in_src(8),   7);
        5'd7:  ctrl.add = add_op(val_src(10), in_src(13),  12);
        5'd9:  ctrl.add = add_op(val_src(9),  in_src(12),  11);
        5'd11: ctrl.add = add_op(val_src(14), in_src(17),  16);
        5'd13: ctrl.add = add_op(val_src(13), in_src(16),  15);
        5'd14: ctrl.add = add_op(val_src(15), val_src(16), 17);
        default: ;
      endcase
    end
    if (run_prep && row_q == 5'd15) begin
      ctrl.add = add_op(val_src(1), next_src(4), 2);
    end
  end

  // Tripler
  always_comb begin
    ctrl.trip = '0;
    if (run_main) begin
      case (row_q)
        5'd1: ctrl.trip = trip_op(in_src(5),   5);
        5'd3: ctrl.trip = trip_op(in_src(10),  10);
        5'd5: ctrl.trip = trip_op(val_src(8),  9);
        5'd6: ctrl.trip = trip_op(in_src(14),  14);
        5'd8: ctrl.trip = trip_op(val_src(12), 13);
        default: ;
      endcase
    end
    if (run_prep) begin
      case (row_q)
        5'd9:  ctrl.trip = trip_op(next_src(0), 1);
        5'd12: ctrl.trip = trip_op(next_src(2), 3);
        5'd14: ctrl.trip = trip_op(next_src(6), 6);
        default: ;
      endcase
    end
  end

endmodule
