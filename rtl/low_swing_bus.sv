// low_swing_bus: the single low-swing bus laid over the central trunk of the
// H-tree, linking the cache controller to the two central rows of subarrays
// (the low-power region).
//
// Low-swing differential wires save most of the wire energy but cannot be
// latched part-way without a transmitter and receiver at every stage, so this
// bus is not pipelined: it carries one operation at a time and stays busy for
// BUSY_CYCLES cycles from the cycle it accepts one, so the cycle time of the
// low-power region equals its access time. Because the bus only spans the width
// of the bank, its delay fits in the H-tree's, and a low-power access takes the
// same REQ_LAT + 1 + RSP_LAT = 5 cycles as a high-power one (published). The
// 2 + 1 + 2 split and treating writes like reads for occupancy are this design's
// choices. The differential transmitter and receiver are analog and are modelled
// only by their delay.
//
// Interface: req_ready_o is 1 when the bus is idle. An operation accepted in
// cycle t reaches the region in cycle t+REQ_LAT, its read data returns on
// rsp_valid_o in cycle t+REQ_LAT+1+RSP_LAT, and the next operation can be
// accepted in cycle t+BUSY_CYCLES.
module low_swing_bus
  import nupa_pkg::*;
#(
  parameter int unsigned REQ_LAT     = 2,
  parameter int unsigned RSP_LAT     = 2,
  parameter int unsigned BUSY_CYCLES = REQ_LAT + 1 + RSP_LAT
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

  localparam int unsigned CNT_W = $clog2(BUSY_CYCLES + 1);

  typedef enum logic [1:0] {IDLE, TO_ARRAY, AT_ARRAY, TO_CTRL} phase_e;

  phase_e           phase;
  logic [CNT_W-1:0] busy_cnt;   // cycles until the bus can accept again
  logic [CNT_W-1:0] phase_cnt;  // cycles left in the current phase
  arr_req_t         op_q;
  line_t            data_q;
  logic             accept;

  assign req_ready_o = (busy_cnt == '0);
  assign accept      = req_valid_i && req_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= IDLE;
      busy_cnt  <= '0;
      phase_cnt <= '0;
    end else begin
      if (accept)              busy_cnt <= CNT_W'(BUSY_CYCLES - 1);
      else if (busy_cnt != '0) busy_cnt <= busy_cnt - CNT_W'(1);
      if (accept) begin
        phase     <= TO_ARRAY;
        phase_cnt <= CNT_W'(REQ_LAT - 1);
      end else unique case (phase)
        IDLE: ;
        TO_ARRAY:
          if (phase_cnt == '0) phase <= AT_ARRAY;
          else                 phase_cnt <= phase_cnt - CNT_W'(1);
        AT_ARRAY: begin
          phase     <= op_q.we ? IDLE : TO_CTRL;
          phase_cnt <= CNT_W'(RSP_LAT - 1);
        end
        TO_CTRL:
          if (phase_cnt == '0) phase <= IDLE;
          else                 phase_cnt <= phase_cnt - CNT_W'(1);
        default: phase <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept)          op_q   <= req_i;
    if (arr_rsp_valid_i) data_q <= arr_rsp_rdata_i;
  end

  // The operation is driven onto the subarrays in its REQ_LAT-th cycle on the bus
  assign arr_valid_o = (phase == TO_ARRAY) && (phase_cnt == '0);
  assign arr_req_o   = op_q;
  assign rsp_valid_o = (phase == TO_CTRL) && (phase_cnt == '0);
  assign rsp_rdata_o = data_q;

  initial assert (REQ_LAT >= 1 && RSP_LAT >= 1 && BUSY_CYCLES >= REQ_LAT + 1 + RSP_LAT)
    else $error("bus timing parameters out of range");

  assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (phase == IDLE || (phase == TO_CTRL && phase_cnt == '0)))
    else $error("bus accepted while busy");

endmodule
