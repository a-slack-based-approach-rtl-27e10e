// dwt_list_unit -- one DWT pass per start, on the 19-step list schedule.
//
// The dataflow graph is evaluated one pass at a time: a start pulse captures the 18
// inputs, the controller (dwt_controller) steps through the 19-step schedule in
// which a 3X node precedes every product, and done reports the result. The first
// step only forms the 3X of the first two multiplicands; without 3X nodes the same
// graph would take 18 steps on these resources.
//
// Interface and timing: with busy low, a one-cycle start captures in_data into the
// input registers; steps 1..19 follow in the next 19 cycles (cstep shows the step);
// done pulses 19 cycles after the edge that sampled start, with result valid until
// the next run. A start while busy is ignored; a new start is accepted in the cycle
// done is high.
// Schedule and resources follow the published DWT example; the handshake, the
// input register bank and the default width of 32 bits are this design's choices.
module dwt_list_unit
  import dwt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] in_data [NUM_IN],
  output logic                busy,
  output logic                done,
  output logic [4:0]          cstep,
  output logic signed [W-1:0] result
);

  dwt_ctrl_t           ctrl;
  logic signed [W-1:0] in_q [NUM_IN];

  dwt_controller u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .busy  (busy),
    .done  (done),
    .cstep (cstep),
    .ctrl  (ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IN; i++) in_q[i] <= '0;
    end else if (start && !busy) begin
      for (int i = 0; i < NUM_IN; i++) in_q[i] <= in_data[i];
    end
  end

  dwt_datapath #(.W(W)) u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctrl    (ctrl),
    .in_cur  (in_q),
    .in_next (in_q),
    .result  (result)
  );

endmodule
