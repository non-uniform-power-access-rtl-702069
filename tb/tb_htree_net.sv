// tb_htree_net: checks the pipelined H-tree model: it always accepts, every
// operation reaches the subarray side exactly REQ_LAT (2) cycles after it
// entered, in order and unchanged, and each read response returns RSP_LAT (2)
// cycles after the subarray produced it, so that with a one-cycle array the
// access takes 5 cycles. A new operation enters every cycle (pipelined).
module tb_htree_net;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0, req_ready, rsp_valid, arr_valid;
  logic arr_rsp_valid = 0;
  arr_req_t req, arr_req;
  line_t rsp_rdata, arr_rsp_rdata;
  int checks = 0, failures = 0, cycle = 0;
  int sent_cycle [$];
  arr_req_t sent [$];
  int rd_cycle [$];
  line_t rd_data [$];

  htree_net dut (.clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
                 .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata), .arr_valid_o(arr_valid),
                 .arr_req_o(arr_req), .arr_rsp_valid_i(arr_rsp_valid),
                 .arr_rsp_rdata_i(arr_rsp_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a one-cycle array: answers each read in the cycle after it arrives
  always @(posedge clk) begin
    cycle <= cycle + 1;
    arr_rsp_valid <= arr_valid && !arr_req.we;
    arr_rsp_rdata <= {16{arr_req.set, 20'h5A5A5}};
    if (rst_n && arr_valid) begin
      checks++;
      if (sent.size() == 0 || arr_req != sent[0] || cycle - sent_cycle[0] != 2) begin
        failures++;
        $display("operation arrived wrong or late at cycle %0d", cycle);
      end
      if (!arr_req.we) begin
        rd_cycle.push_back(sent_cycle[0]);
        rd_data.push_back({16{arr_req.set, 20'h5A5A5}});
      end
      if (sent.size() > 0) begin void'(sent.pop_front()); void'(sent_cycle.pop_front()); end
    end
    if (rst_n && rsp_valid) begin
      checks++;
      if (rd_data.size() == 0 || rsp_rdata != rd_data[0] || cycle - rd_cycle[0] != 5) begin
        failures++;
        $display("response wrong or late at cycle %0d", cycle);
      end
      if (rd_data.size() > 0) begin void'(rd_data.pop_front()); void'(rd_cycle.pop_front()); end
    end
    if (req_valid && req_ready) begin
      sent.push_back(req);
      sent_cycle.push_back(cycle);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 4) != 0;
      req.we = $urandom % 2;
      req.way = way_t'(1 + $urandom % 15);
      req.set = set_t'($urandom);
      req.wdata = {16{$urandom}};
      req.wmask = {$urandom, $urandom};
      checks++;
      if (!req_ready) failures++;
    end
    @(negedge clk) req_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (sent.size() != 0 || rd_data.size() != 0) begin
      failures++;
      $display("operations lost in the H-tree");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
