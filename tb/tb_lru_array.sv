// tb_lru_array: checks the LRU order of the high-power ways against a
// reference recency list: the reset sweep takes 4096 cycles; after it way 15 is
// the oldest and way 1 the youngest in every set; every touch makes a way the
// youngest; lru_way_o and mru_way_o name the oldest and youngest way one cycle
// after a read and stay current through later touches. Random touches on a
// few sets.
module tb_lru_array;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, rd_en = 0, touch_en = 0, init_done;
  set_t rd_set;
  way_t touch_way, lru_way, mru_way;
  int checks = 0, failures = 0;
  int order [8][$];  // per set, ways from youngest to oldest

  lru_array dut (.clk, .rst_n, .rd_en_i(rd_en), .rd_set_i(rd_set), .lru_way_o(lru_way),
                 .mru_way_o(mru_way), .touch_en_i(touch_en), .touch_way_i(touch_way),
                 .init_done_o(init_done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int s);
    checks++;
    if (int'(lru_way) != order[s][$] || int'(mru_way) != order[s][0]) begin
      failures++;
      $display("set %0d lru %0d mru %0d expected %0d %0d", s, lru_way, mru_way, order[s][$], order[s][0]);
    end
  endtask

  task automatic check_set(input int s);
    rd_en = 1; rd_set = set_t'(s * 500);
    @(posedge clk); #1;
    rd_en = 0;
    compare(s);
  endtask

  initial begin
    for (int s = 0; s < 8; s++)
      for (int w = 1; w < int'(WAYS); w++) order[s].push_back(w);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < int'(SETS); c++) begin
      @(posedge clk); #1;
      checks++;
      if (init_done != (c == int'(SETS) - 1)) begin
        failures++;
        $display("reset sweep ends at the wrong cycle");
        break;
      end
    end
    while (!init_done) @(posedge clk);
    #1;
    for (int s = 0; s < 8; s++) check_set(s);
    for (int i = 0; i < 3000; i++) begin
      int s, w;
      s = $urandom % 8;
      check_set(s);
      repeat (1 + $urandom % 3) begin
        // favour a few ways so that the order is not just round-robin
        w = ($urandom % 2) ? 1 + $urandom % 3 : 1 + $urandom % (WAYS - 1);
        touch_en = 1; touch_way = way_t'(w);
        @(posedge clk); #1;
        touch_en = 0;
        foreach (order[s][k]) if (order[s][k] == w) begin order[s].delete(k); break; end
        order[s].push_front(w);
        compare(s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
