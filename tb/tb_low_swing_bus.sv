// tb_low_swing_bus: checks the non-pipelined low-swing bus model: every
// operation reaches the subarray side exactly 2 cycles after it was accepted,
// unchanged; a read returns 5 cycles after acceptance; and after accepting an
// operation the bus refuses new ones for the next 4 cycles, so accepted
// operations are at least 5 cycles apart (cycle time = access time). The
// requester offers operations in most cycles, so the bus is kept busy.
module tb_low_swing_bus;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0, req_ready, rsp_valid, arr_valid;
  logic arr_rsp_valid = 0;
  arr_req_t req, arr_req;
  line_t rsp_rdata, arr_rsp_rdata;
  int checks = 0, failures = 0, cycle = 0;
  int sent_cycle [$];
  arr_req_t sent [$];
  int rd_cycle [$];
  int accepted = 0, last_accept = 0, back_to_back = 0, refused = 0;
  line_t rd_data [$];

  low_swing_bus dut (.clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
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
    if (rst_n && req_valid && !req_ready) refused++;
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
      checks++;
      if (sent_cycle.size() > 0 || (accepted > 0 && cycle - last_accept < 5)) begin
        failures++;
        $display("bus accepted while busy at cycle %0d", cycle);
      end
      if (accepted > 0 && cycle - last_accept == 5) back_to_back++;
      accepted++;
      last_accept = cycle;
      sent.push_back(req);
      sent_cycle.push_back(cycle);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) begin req_valid = 0; repeat ($urandom % 7) @(negedge clk); end
      req_valid = ($urandom % 4) != 0;
      req.we = $urandom % 2;
      req.way = way_t'(1 + $urandom % 15);
      req.set = set_t'($urandom);
      req.wdata = {16{$urandom}};
      req.wmask = {$urandom, $urandom};
      // hold the operation until the bus takes it
      forever begin
        if (req_ready || !req_valid) begin @(posedge clk); break; end
        @(negedge clk);
      end
    end
    @(negedge clk) req_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (sent.size() != 0 || rd_data.size() != 0) begin
      failures++;
      $display("operations lost in the H-tree");
    end
    checks++;
    if (back_to_back == 0 || refused == 0) begin
      failures++;
      $display("the bus was never kept busy");
    end
    $display("accepted %0d, back-to-back %0d, refused cycles %0d", accepted, back_to_back, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
