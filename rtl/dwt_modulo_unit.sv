// dwt_modulo_unit -- streaming DWT datapath on the overlapped 15-step schedule.
//
// Same functional units and registers as the one-pass unit (dwt_datapath), driven
// by dwt_modulo_controller, which starts a new iteration every 15 steps and
// computes the 3X values and the first products of iteration i+1 in the free
// slots of iteration i. Because two iterations overlap, the inputs are held in two
// banks: an accepted input set goes to the "next" bank, which the next-iteration
// operations read, and moves to the "current" bank at the end of step 15.
//
// Interface and timing: valid/ready input handshake (in_valid, in_ready, in_data);
// in_ready is high while idle and in step 8 of each period. out_valid pulses for
// one cycle when result holds the value of a finished iteration, 21 cycles after
// its input set was accepted; with an input set offered at every step 8, results
// follow every 15 cycles. Results come out in input order.
// The schedule follows the published DWT modulo schedule; the handshake and the
// two input banks are this design's choices.
module dwt_modulo_unit
  import dwt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_data [NUM_IN],
  output logic                out_valid,
  output logic                busy,
  output logic [4:0]          cstep,
  output logic signed [W-1:0] result
);

  dwt_ctrl_t           ctrl;
  logic                accept, swap;
  logic signed [W-1:0] cur_q  [NUM_IN];
  logic signed [W-1:0] next_q [NUM_IN];

  dwt_modulo_controller u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .accept    (accept),
    .swap      (swap),
    .out_valid (out_valid),
    .busy      (busy),
    .cstep     (cstep),
    .ctrl      (ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IN; i++) begin
        cur_q[i]  <= '0;
        next_q[i] <= '0;
      end
    end else begin
      if (accept) begin
        for (int i = 0; i < NUM_IN; i++) next_q[i] <= in_data[i];
      end
      if (swap) begin
        for (int i = 0; i < NUM_IN; i++) cur_q[i] <= next_q[i];
      end
    end
  end

  dwt_datapath #(.W(W)) u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctrl    (ctrl),
    .in_cur  (cur_q),
    .in_next (next_q),
    .result  (result)
  );

endmodule
