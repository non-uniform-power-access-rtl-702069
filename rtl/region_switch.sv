// region_switch: connects the cache controller either to the low-swing bus or
// to the regular H-tree, depending on which power region the operation
// addresses.
//
// The published design places a simple switch between the controller and the
// two interconnects, so that the low-swing bus stays invisible to the rest of
// the cache. Operations with region_i = REGION_LP go to the low-swing bus, the
// others to the H-tree; the controller sees the ready signal of the selected
// path, so a busy low-swing bus stalls it. Read responses from both paths are
// merged onto one response port. The controller waits for each read, so two
// responses never arrive together; an assertion checks this.
module region_switch
  import nupa_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // controller side
  input  logic     req_valid_i,
  input  region_e  region_i,
  input  arr_req_t req_i,
  output logic     req_ready_o,
  output logic     rsp_valid_o,
  output line_t    rsp_rdata_o,
  // H-tree (high-power region)
  output logic     hp_valid_o,
  output arr_req_t hp_req_o,
  input  logic     hp_ready_i,
  input  logic     hp_rsp_valid_i,
  input  line_t    hp_rsp_rdata_i,
  // low-swing bus (low-power region)
  output logic     lp_valid_o,
  output arr_req_t lp_req_o,
  input  logic     lp_ready_i,
  input  logic     lp_rsp_valid_i,
  input  line_t    lp_rsp_rdata_i
);

  assign hp_valid_o  = req_valid_i && (region_i == REGION_HP);
  assign lp_valid_o  = req_valid_i && (region_i == REGION_LP);
  assign hp_req_o    = req_i;
  assign lp_req_o    = req_i;
  assign req_ready_o = (region_i == REGION_LP) ? lp_ready_i : hp_ready_i;

  assign rsp_valid_o = hp_rsp_valid_i || lp_rsp_valid_i;
  assign rsp_rdata_o = lp_rsp_valid_i ? lp_rsp_rdata_i : hp_rsp_rdata_i;

  assert property (@(posedge clk) disable iff (!rst_n) !(hp_rsp_valid_i && lp_rsp_valid_i))
    else $error("responses from both regions in one cycle");

endmodule
