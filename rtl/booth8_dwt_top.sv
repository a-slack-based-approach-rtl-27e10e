// booth8_dwt_top -- the two DWT datapaths built on radix-8 Booth multipliers
// whose 3X multiple is computed by a separate Tripler unit.
//
// Both units evaluate the same 17-operation DWT dataflow graph on the same
// resource set (2 multipliers of latency 3, 1 adder and 1 tripler of latency 1):
//   * list_*  -- dwt_list_unit: one pass per start on the 19-step list schedule;
//   * mod_*   -- dwt_modulo_unit: a stream of input sets on the overlapped schedule,
//               a new iteration every 15 steps, the 3X values and first products
//               of the next iteration computed in the slack of the current one.
// They are independent and share nothing but clock and reset; a user who needs
// only one schedule instantiates that unit directly.
//
// Interface: see dwt_list_unit and dwt_modulo_unit for the handshakes and timing.
module booth8_dwt_top
  import dwt_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // one-pass unit, list schedule
  input  logic                list_start,
  input  logic signed [W-1:0] list_in_data [NUM_IN],
  output logic                list_busy,
  output logic                list_done,
  output logic [4:0]          list_cstep,
  output logic signed [W-1:0] list_result,
  // streaming unit, modulo schedule
  input  logic                mod_in_valid,
  output logic                mod_in_ready,
  input  logic signed [W-1:0] mod_in_data [NUM_IN],
  output logic                mod_out_valid,
  output logic                mod_busy,
  output logic [4:0]          mod_cstep,
  output logic signed [W-1:0] mod_result
);

  dwt_list_unit #(.W(W)) u_list (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (list_start),
    .in_data (list_in_data),
    .busy    (list_busy),
    .done    (list_done),
    .cstep   (list_cstep),
    .result  (list_result)
  );

  dwt_modulo_unit #(.W(W)) u_mod (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mod_in_valid),
    .in_ready  (mod_in_ready),
    .in_data   (mod_in_data),
    .out_valid (mod_out_valid),
    .busy      (mod_busy),
    .cstep     (mod_cstep),
    .result    (mod_result)
  );

endmodule
