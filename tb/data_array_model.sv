// data_array_model: behavioural data array used to test the cache controller
// on its own. Not part of the design. It holds every way of every set that is
// written, takes one operation per cycle (always ready) and returns each read
// LATENCY cycles after the operation was accepted, which is the bank's access
// time over either interconnect. It counts operations per region.
module data_array_model
  import nupa_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_i,
  input  region_e     region_i,
  input  arr_req_t    req_i,
  output logic        ready_o,
  output logic        rsp_valid_o,
  output line_t       rsp_rdata_o,
  output int unsigned lp_ops_o,
  output int unsigned hp_ops_o,
  output int unsigned bad_region_o
);

  line_t store [logic [WAY_W+SET_W-1:0]];
  logic  pipe_v [LATENCY];
  line_t pipe_d [LATENCY];

  assign ready_o     = 1'b1;
  assign rsp_valid_o = pipe_v[LATENCY-1];
  assign rsp_rdata_o = pipe_d[LATENCY-1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LATENCY); i++) pipe_v[i] <= 1'b0;
      lp_ops_o <= 0;
      hp_ops_o <= 0;
      bad_region_o <= 0;
    end else begin
      for (int i = 1; i < int'(LATENCY); i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= valid_i && !req_i.we;
      if (valid_i) begin
        if (region_i == REGION_LP) lp_ops_o <= lp_ops_o + 1;
        else                       hp_ops_o <= hp_ops_o + 1;
        // way 0 lives in the low-power region, the others in the high-power one
        if ((region_i == REGION_LP) != (req_i.way == '0)) bad_region_o <= bad_region_o + 1;
        if (req_i.we)
          store[{req_i.way, req_i.set}] = merge_line(
            store.exists({req_i.way, req_i.set}) ? store[{req_i.way, req_i.set}] : '0,
            req_i.wdata, req_i.wmask);
        else
          pipe_d[0] <= store.exists({req_i.way, req_i.set}) ? store[{req_i.way, req_i.set}] : '0;
      end
    end
  end

endmodule
