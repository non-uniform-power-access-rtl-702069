// main_memory_model: behavioural main memory for the cache-bank testbenches.
//
// Not synthesizable and not part of the design. It accepts one request at a
// time (req_ready_o low while a read is outstanding). A write is stored at
// once; a read returns its line on rsp_valid_o LATENCY cycles after it was
// accepted (300 cycles in the published system). A line never written holds
// init_line(addr), a pattern that the testbenches can recompute.
module main_memory_model
  import nupa_pkg::*;
#(
  parameter int unsigned LATENCY = 300
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic               req_we_i,
  input  logic [LADDR_W-1:0] req_addr_i,
  input  line_t              req_wdata_i,
  output logic               rsp_valid_o,
  output line_t              rsp_rdata_o,
  output int unsigned        reads_o,
  output int unsigned        writes_o
);

  function automatic line_t init_line(logic [LADDR_W-1:0] a);
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++)
      l[i*32 +: 32] = {a[15:0], 16'(i)} ^ {6'(i), a};
    return l;
  endfunction

  line_t store [logic [LADDR_W-1:0]];
  int unsigned wait_cnt;
  logic busy;
  logic [LADDR_W-1:0] rd_addr;

  assign req_ready_o = !busy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      rsp_valid_o <= 1'b0;
      wait_cnt    <= 0;
      reads_o     <= 0;
      writes_o    <= 0;
    end else begin
      rsp_valid_o <= 1'b0;
      if (req_valid_i && req_ready_o) begin
        if (req_we_i) begin
          store[req_addr_i] = req_wdata_i;
          writes_o <= writes_o + 1;
        end else begin
          busy     <= 1'b1;
          rd_addr  <= req_addr_i;
          wait_cnt <= LATENCY - 1;
          reads_o  <= reads_o + 1;
        end
      end else if (busy) begin
        if (wait_cnt <= 1) begin
          busy        <= 1'b0;
          rsp_valid_o <= 1'b1;
          rsp_rdata_o <= store.exists(rd_addr) ? store[rd_addr] : init_line(rd_addr);
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end

endmodule
