// data_region: the data subarrays of one power region of the bank.
//
// The data array of the bank is a 32 x 32 grid of equal SRAM subarrays. The two
// central rows (64 subarrays, one sixteenth of the capacity) hang on the
// low-swing bus and hold the low-power way 0; the other 30 rows hang on the
// H-tree and hold the high-power ways 1..15. This module models one region as a
// memory of NWAYS x NSETS lines: instanced with NWAYS=1, FIRST_WAY=0 it is the
// low-power region, with NWAYS=15, FIRST_WAY=1 the high-power region. How a
// line is spread over the subarrays of its region (wordline and bitline
// segments, sense amplifiers) is not modelled: every line of a region is
// reached in one array cycle, which is how the published design keeps access
// time uniform.
//
// Interface: one operation per cycle (req_valid_i, req_i); a write stores the
// bytes selected by wmask, a read returns the line on rsp_valid_o/rsp_rdata_o in
// the next cycle. Reads see earlier writes in order.
module data_region
  import nupa_pkg::*;
#(
  parameter int unsigned NWAYS     = HP_WAYS,
  parameter int unsigned FIRST_WAY = LP_WAYS,
  parameter int unsigned NSETS     = SETS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid_i,
  input  arr_req_t req_i,
  output logic     rsp_valid_o,
  output line_t    rsp_rdata_o
);

  localparam int unsigned IDX_W = $clog2(NWAYS * NSETS);
  localparam int unsigned LW_W  = (NWAYS > 1) ? $clog2(NWAYS) : 1;

  line_t mem [NWAYS * NSETS];

  logic [LW_W-1:0]  local_way;
  logic [IDX_W-1:0] idx;

  always_comb begin
    local_way = LW_W'(req_i.way - WAY_W'(FIRST_WAY));
    idx       = IDX_W'(local_way) * IDX_W'(NSETS) + IDX_W'(req_i.set);
  end

  always_ff @(posedge clk) begin
    if (req_valid_i) begin
      if (req_i.we) begin
        for (int b = 0; b < int'(LINE_BYTES); b++)
          if (req_i.wmask[b]) mem[idx][b*8 +: 8] <= req_i.wdata[b*8 +: 8];
      end else begin
        rsp_rdata_o <= mem[idx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_valid_o <= 1'b0;
    else        rsp_valid_o <= req_valid_i && !req_i.we;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    req_valid_i |-> (int'(req_i.way) >= int'(FIRST_WAY) && int'(req_i.way) < int'(FIRST_WAY + NWAYS)))
    else $error("way %0d is not in this region", req_i.way);

endmodule
