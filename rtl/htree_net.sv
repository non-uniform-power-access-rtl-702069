// htree_net: the balanced, pipelined full-swing H-tree between the cache
// controller and the high-power subarrays.
//
// The H-tree gives every subarray the same distance from the controller, so
// every high-power access takes the same time, and its repeated full-swing
// wires can be latched along the way, so a new operation can enter every
// cycle. The model is a delay line of REQ_LAT register stages from the
// controller to the subarrays and RSP_LAT stages back. With the one-cycle array
// read of data_region the access takes REQ_LAT + 1 + RSP_LAT = 5 cycles, the
// published bank latency; the split into 2 + 1 + 2 cycles is this design's
// choice.
//
// Interface: req_ready_o is always 1. An operation accepted in cycle t reaches
// the region in cycle t+REQ_LAT; the line read returns on rsp_valid_o in cycle
// t+REQ_LAT+1+RSP_LAT. Operations stay in order.
module htree_net
  import nupa_pkg::*;
#(
  parameter int unsigned REQ_LAT = 2,
  parameter int unsigned RSP_LAT = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // controller side
  input  logic     req_valid_i,
  output logic     req_ready_o,
  input  arr_req_t req_i,
  output logic     rsp_valid_o,
  output line_t    rsp_rdata_o,
  // subarray side
  output logic     arr_valid_o,
  output arr_req_t arr_req_o,
  input  logic     arr_rsp_valid_i,
  input  line_t    arr_rsp_rdata_i
);

  logic     req_v [REQ_LAT];
  arr_req_t req_d [REQ_LAT];
  logic     rsp_v [RSP_LAT];
  line_t    rsp_d [RSP_LAT];

  assign req_ready_o = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(REQ_LAT); i++) req_v[i] <= 1'b0;
      for (int i = 0; i < int'(RSP_LAT); i++) rsp_v[i] <= 1'b0;
    end else begin
      req_v[0] <= req_valid_i;
      for (int i = 1; i < int'(REQ_LAT); i++) req_v[i] <= req_v[i-1];
      rsp_v[0] <= arr_rsp_valid_i;
      for (int i = 1; i < int'(RSP_LAT); i++) rsp_v[i] <= rsp_v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    req_d[0] <= req_i;
    for (int i = 1; i < int'(REQ_LAT); i++) req_d[i] <= req_d[i-1];
    rsp_d[0] <= arr_rsp_rdata_i;
    for (int i = 1; i < int'(RSP_LAT); i++) rsp_d[i] <= rsp_d[i-1];
  end

  assign arr_valid_o = req_v[REQ_LAT-1];
  assign arr_req_o   = req_d[REQ_LAT-1];
  assign rsp_valid_o = rsp_v[RSP_LAT-1];
  assign rsp_rdata_o = rsp_d[RSP_LAT-1];

  initial assert (REQ_LAT >= 1 && RSP_LAT >= 1) else $error("latencies must be at least 1");

endmodule
