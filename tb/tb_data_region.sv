// tb_data_region: checks the high-power data region (ways 1..15, 4096 sets):
// byte-masked writes and whole-line reads against a reference copy, read data
// one cycle after the request, and back-to-back operations every cycle.
module tb_data_region;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0, rsp_valid;
  arr_req_t req;
  line_t rsp_rdata;
  int checks = 0, failures = 0;
  line_t ref_mem [logic [31:0]];
  line_t expect_q [$];

  data_region dut (.clk, .rst_n, .req_valid_i(req_valid), .req_i(req),
                   .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // check responses: one cycle after each read
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (expect_q.size() > 0) begin
        checks++;
        if (!rsp_valid || rsp_rdata != expect_q[0]) begin
          failures++;
          $display("read mismatch or missing response");
        end
        void'(expect_q.pop_front());
      end else if (rsp_valid) begin
        failures++;
        $display("unexpected response");
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    // initialise the lines used, then random masked writes and reads
    for (int w = 1; w < int'(WAYS); w++)
      for (int s = 0; s < 4; s++) begin
        req_valid = 1;
        req = '{we: 1'b1, way: way_t'(w), set: set_t'(s * 1365), wdata: rand_line(), wmask: '1};
        ref_mem[{16'(w), 16'(s * 1365)}] = req.wdata;
        @(negedge clk);
      end
    for (int i = 0; i < 3000; i++) begin
      int w, s;
      logic [31:0] k;
      w = 1 + $urandom % (WAYS - 1);
      s = ($urandom % 4) * 1365;
      k = {16'(w), 16'(s)};
      req_valid = 1;
      req.way = way_t'(w); req.set = set_t'(s);
      req.we = $urandom % 2;
      req.wdata = rand_line();
      req.wmask = {$urandom, $urandom};
      if (req.we) ref_mem[k] = merge_line(ref_mem[k], req.wdata, req.wmask);
      else expect_q.push_back(ref_mem[k]);
      @(negedge clk);
      if ($urandom % 4 == 0) begin req_valid = 0; @(negedge clk); end
    end
    req_valid = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
