// tb_region_switch: checks that the switch sends each operation to the
// interconnect of the region it addresses (low-swing bus for the low-power
// region, H-tree otherwise) and never to both, that the controller sees the
// ready signal of the selected interconnect, and that read responses from
// either side reach the controller.
module tb_region_switch;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid;
  region_e region;
  arr_req_t req, hp_req, lp_req;
  line_t rsp_rdata, hp_rsp_rdata, lp_rsp_rdata;
  logic hp_valid, hp_ready, hp_rsp_valid, lp_valid, lp_ready, lp_rsp_valid;
  int checks = 0, failures = 0;

  region_switch dut (.clk, .rst_n, .req_valid_i(req_valid), .region_i(region), .req_i(req),
                     .req_ready_o(req_ready), .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata),
                     .hp_valid_o(hp_valid), .hp_req_o(hp_req), .hp_ready_i(hp_ready),
                     .hp_rsp_valid_i(hp_rsp_valid), .hp_rsp_rdata_i(hp_rsp_rdata),
                     .lp_valid_o(lp_valid), .lp_req_o(lp_req), .lp_ready_i(lp_ready),
                     .lp_rsp_valid_i(lp_rsp_valid), .lp_rsp_rdata_i(lp_rsp_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic exp_hp_v, exp_lp_v, exp_ready;
      int r;
      @(negedge clk);
      req_valid = $urandom % 2;
      region = region_e'($urandom % 2);
      req = '{we: 1'($urandom), way: way_t'($urandom), set: set_t'($urandom),
              wdata: {16{$urandom}}, wmask: {$urandom, $urandom}};
      hp_ready = $urandom % 2;
      lp_ready = $urandom % 2;
      r = $urandom % 3;  // 0: no response, 1: from the H-tree, 2: from the bus
      hp_rsp_valid = (r == 1);
      lp_rsp_valid = (r == 2);
      hp_rsp_rdata = {16{$urandom}};
      lp_rsp_rdata = {16{$urandom}};
      #1;
      exp_hp_v  = req_valid && region == REGION_HP;
      exp_lp_v  = req_valid && region == REGION_LP;
      exp_ready = (region == REGION_LP) ? lp_ready : hp_ready;
      checks++;
      if (hp_valid != exp_hp_v || lp_valid != exp_lp_v || req_ready != exp_ready) begin
        failures++;
        $display("routing error: region %s valid %b -> hp %b lp %b ready %b",
                 region.name(), req_valid, hp_valid, lp_valid, req_ready);
      end
      checks++;
      if ((exp_hp_v && hp_req != req) || (exp_lp_v && lp_req != req)) begin
        failures++;
        $display("operation altered");
      end
      checks++;
      if (rsp_valid != (r != 0) || (r == 1 && rsp_rdata != hp_rsp_rdata) ||
          (r == 2 && rsp_rdata != lp_rsp_rdata)) begin
        failures++;
        $display("response error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
