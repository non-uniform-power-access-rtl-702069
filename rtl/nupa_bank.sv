// nupa_bank: a 4 MB, 16-way last-level cache bank with non-uniform power
// access.
//
// The data array is a 32 x 32 grid of subarrays. As in any large bank, a
// balanced, pipelined H-tree of full-swing wires reaches every subarray in the
// same time. Here a single low-swing bus is laid over the central trunk of that
// H-tree, and the two central rows of subarrays hang on it instead of on the
// H-tree. Because the bus only spans the width of the bank, its delay fits in
// the H-tree's, so both regions have the same 5-cycle access time, but an
// access over the low-swing bus costs a fraction of the energy. The bus is not
// pipelined, so back-to-back low-power operations wait for each other. The two
// central rows hold exactly one way (way 0) of every set: the low-power way.
//
// The controller keeps the most recently touched block of each set in way 0
// (Duplicate policy: the copy in a high-power way stays, and only a dirty way-0
// block is written back into it on eviction), and a global saturating counter
// switches this copying off in program phases where way 0 is seldom hit again.
//
// Structure: nupa_controller (with tag_array, lru_array, reconfig_counter) ->
// region_switch -> htree_net -> data_region (ways 1..15)
//                -> low_swing_bus -> data_region (way 0).
// Main memory is outside the bank, on the mem_* port. Everything follows the
// published organisation; the port protocol, the 2+1+2 split of the 5-cycle
// access and the 32-bit address are this design's choices.
//
// Timing: see nupa_controller; a read that hits answers 8 cycles after the
// request is accepted, one request is handled at a time.
module nupa_bank
  import nupa_pkg::*;
#(
  parameter int unsigned REQ_LAT = 2,  // controller -> subarray, cycles
  parameter int unsigned RSP_LAT = 2,  // subarray -> controller, cycles
  parameter bit DYN_RECONFIG = 1'b1    // 0: smart placement without dynamic reconfiguration
) (
  input  logic               clk,
  input  logic               rst_n,
  // requests
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic               req_we_i,
  input  logic [ADDR_W-1:0]  req_addr_i,
  input  line_t              req_wdata_i,
  input  mask_t              req_wmask_i,
  output logic               rsp_valid_o,
  output line_t              rsp_rdata_o,
  output logic               rsp_lp_o,
  // main memory
  output logic               mem_req_valid_o,
  input  logic               mem_req_ready_i,
  output logic               mem_req_we_o,
  output logic [LADDR_W-1:0] mem_req_addr_o,
  output line_t              mem_req_wdata_o,
  input  logic               mem_rsp_valid_i,
  input  line_t              mem_rsp_rdata_i,
  // mode and events
  output mode_e              mode_o,
  output logic signed [4:0]  ctr_o,
  output logic               evt_lp_hit_o,
  output logic               evt_hp_hit_o,
  output logic               evt_miss_o,
  output logic               evt_copy_o,
  output logic               evt_lp_wb_o,
  output logic               evt_mem_wb_o,
  output logic               evt_stall_o
);

  // the low-power rows must hold exactly the low-power ways
  if (NDWL * LP_ROWS * WAYS != NDWL * NDBL * LP_WAYS) begin : g_geometry_check
    $error("low-power subarray rows do not match the low-power ways");
  end

  logic     arr_valid, arr_ready, arr_rsp_valid;
  region_e  arr_region;
  arr_req_t arr_req;
  line_t    arr_rsp_rdata;

  logic     hp_valid, hp_ready, hp_rsp_valid, hp_arr_valid, hp_arr_rsp_valid;
  arr_req_t hp_req, hp_arr_req;
  line_t    hp_rsp_rdata, hp_arr_rsp_rdata;
  logic     lp_valid, lp_ready, lp_rsp_valid, lp_arr_valid, lp_arr_rsp_valid;
  arr_req_t lp_req, lp_arr_req;
  line_t    lp_rsp_rdata, lp_arr_rsp_rdata;

  nupa_controller #(.DYN_RECONFIG(DYN_RECONFIG)) u_ctrl (
    .clk, .rst_n,
    .req_valid_i, .req_ready_o, .req_we_i, .req_addr_i, .req_wdata_i, .req_wmask_i,
    .rsp_valid_o, .rsp_rdata_o, .rsp_lp_o,
    .arr_valid_o(arr_valid), .arr_region_o(arr_region), .arr_req_o(arr_req),
    .arr_ready_i(arr_ready), .arr_rsp_valid_i(arr_rsp_valid), .arr_rsp_rdata_i(arr_rsp_rdata),
    .mem_req_valid_o, .mem_req_ready_i, .mem_req_we_o, .mem_req_addr_o, .mem_req_wdata_o,
    .mem_rsp_valid_i, .mem_rsp_rdata_i,
    .mode_o, .ctr_o, .evt_lp_hit_o, .evt_hp_hit_o, .evt_miss_o, .evt_copy_o,
    .evt_lp_wb_o, .evt_mem_wb_o, .evt_stall_o
  );

  region_switch u_switch (
    .clk, .rst_n,
    .req_valid_i(arr_valid), .region_i(arr_region), .req_i(arr_req), .req_ready_o(arr_ready),
    .rsp_valid_o(arr_rsp_valid), .rsp_rdata_o(arr_rsp_rdata),
    .hp_valid_o(hp_valid), .hp_req_o(hp_req), .hp_ready_i(hp_ready),
    .hp_rsp_valid_i(hp_rsp_valid), .hp_rsp_rdata_i(hp_rsp_rdata),
    .lp_valid_o(lp_valid), .lp_req_o(lp_req), .lp_ready_i(lp_ready),
    .lp_rsp_valid_i(lp_rsp_valid), .lp_rsp_rdata_i(lp_rsp_rdata)
  );

  htree_net #(.REQ_LAT(REQ_LAT), .RSP_LAT(RSP_LAT)) u_htree (
    .clk, .rst_n,
    .req_valid_i(hp_valid), .req_ready_o(hp_ready), .req_i(hp_req),
    .rsp_valid_o(hp_rsp_valid), .rsp_rdata_o(hp_rsp_rdata),
    .arr_valid_o(hp_arr_valid), .arr_req_o(hp_arr_req),
    .arr_rsp_valid_i(hp_arr_rsp_valid), .arr_rsp_rdata_i(hp_arr_rsp_rdata)
  );

  low_swing_bus #(.REQ_LAT(REQ_LAT), .RSP_LAT(RSP_LAT)) u_lsbus (
    .clk, .rst_n,
    .req_valid_i(lp_valid), .req_ready_o(lp_ready), .req_i(lp_req),
    .rsp_valid_o(lp_rsp_valid), .rsp_rdata_o(lp_rsp_rdata),
    .arr_valid_o(lp_arr_valid), .arr_req_o(lp_arr_req),
    .arr_rsp_valid_i(lp_arr_rsp_valid), .arr_rsp_rdata_i(lp_arr_rsp_rdata)
  );

  data_region #(.NWAYS(HP_WAYS), .FIRST_WAY(LP_WAYS)) u_hp_region (
    .clk, .rst_n,
    .req_valid_i(hp_arr_valid), .req_i(hp_arr_req),
    .rsp_valid_o(hp_arr_rsp_valid), .rsp_rdata_o(hp_arr_rsp_rdata)
  );

  data_region #(.NWAYS(LP_WAYS), .FIRST_WAY(0)) u_lp_region (
    .clk, .rst_n,
    .req_valid_i(lp_arr_valid), .req_i(lp_arr_req),
    .rsp_valid_o(lp_arr_rsp_valid), .rsp_rdata_o(lp_arr_rsp_rdata)
  );

endmodule
