// tb_nupa_controller: tests the cache controller against an independent
// reference model of the bank's policy.
//
// The controller is connected to a behavioural data array (5-cycle reads,
// always ready) and a behavioural main memory (20-cycle reads). For every
// request the reference model predicts, from its own copy of each set (way 0,
// and the high-power blocks in LRU order), whether the lookup hits way 0, hits
// a high-power way or misses; how many blocks are copied into way 0; whether a
// dirty way-0 block is written to its high-power copy; how many lines are
// written back to memory; and the counter value and mode afterwards (+2 / -1,
// limits -15 and +15, threshold 0). The controller's event strobes and mode
// must match. All read data are compared with a reference memory image, and
// array operations must address way 0 only through the low-power region.
module tb_nupa_controller;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [ADDR_W-1:0] req_addr = '0;
  line_t req_wdata = '0, rsp_rdata;
  mask_t req_wmask = '0;
  logic rsp_valid, rsp_lp;
  logic arr_valid, arr_ready, arr_rsp_valid;
  region_e arr_region;
  arr_req_t arr_req;
  line_t arr_rsp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [LADDR_W-1:0] mem_req_addr;
  line_t mem_req_wdata, mem_rsp_rdata;
  mode_e mode;
  logic signed [4:0] ctr;
  logic evt_lp_hit, evt_hp_hit, evt_miss, evt_copy, evt_lp_wb, evt_mem_wb, evt_stall;
  int unsigned mem_reads, mem_writes, lp_ops, hp_ops, bad_region;

  int checks = 0, failures = 0;

  nupa_controller dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we), .req_addr_i(req_addr),
    .req_wdata_i(req_wdata), .req_wmask_i(req_wmask),
    .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata), .rsp_lp_o(rsp_lp),
    .arr_valid_o(arr_valid), .arr_region_o(arr_region), .arr_req_o(arr_req),
    .arr_ready_i(arr_ready), .arr_rsp_valid_i(arr_rsp_valid), .arr_rsp_rdata_i(arr_rsp_rdata),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
    .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
    .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_rdata_i(mem_rsp_rdata),
    .mode_o(mode), .ctr_o(ctr),
    .evt_lp_hit_o(evt_lp_hit), .evt_hp_hit_o(evt_hp_hit), .evt_miss_o(evt_miss),
    .evt_copy_o(evt_copy), .evt_lp_wb_o(evt_lp_wb), .evt_mem_wb_o(evt_mem_wb),
    .evt_stall_o(evt_stall)
  );

  data_array_model u_arr (
    .clk, .rst_n, .valid_i(arr_valid), .region_i(arr_region), .req_i(arr_req),
    .ready_o(arr_ready), .rsp_valid_o(arr_rsp_valid), .rsp_rdata_o(arr_rsp_rdata),
    .lp_ops_o(lp_ops), .hp_ops_o(hp_ops), .bad_region_o(bad_region)
  );

  main_memory_model #(.LATENCY(20)) u_mem (
    .clk, .rst_n,
    .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready), .req_we_i(mem_req_we),
    .req_addr_i(mem_req_addr), .req_wdata_i(mem_req_wdata),
    .rsp_valid_o(mem_rsp_valid), .rsp_rdata_o(mem_rsp_rdata),
    .reads_o(mem_reads), .writes_o(mem_writes)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t init_line(logic [LADDR_W-1:0] a);
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++)
      l[i*32 +: 32] = {a[15:0], 16'(i)} ^ {6'(i), a};
    return l;
  endfunction

  line_t golden [logic [LADDR_W-1:0]];
  function automatic line_t golden_line(logic [LADDR_W-1:0] a);
    return golden.exists(a) ? golden[a] : init_line(a);
  endfunction

  // ------------------------------------------------------------ reference policy
  typedef struct { tag_t tag; logic dirty; } blk_t;
  logic lp_valid [int];
  tag_t lp_tag   [int];
  logic lp_dirty [int];
  blk_t hp [int][$];  // front = most recently used
  int   ref_ctr = 0;
  mode_e ref_mode = MODE_PLACEMENT;

  // expected events of one request
  int e_lp_hit, e_hp_hit, e_miss, e_copy, e_lp_wb, e_mem_wb;

  function automatic int find(int s, tag_t t);
    foreach (hp[s][i]) if (hp[s][i].tag == t) return i;
    return -1;
  endfunction

  function automatic void touch(int s, int i);
    blk_t b;
    b = hp[s][i];
    hp[s].delete(i);
    hp[s].push_front(b);
  endfunction

  task automatic ref_access(int s, tag_t t, logic we);
    logic lph, hph, place, cnt_hit;
    int hi, ci;
    if (!lp_valid.exists(s)) begin lp_valid[s] = 0; lp_dirty[s] = 0; lp_tag[s] = '0; end
    e_lp_hit = 0; e_hp_hit = 0; e_miss = 0; e_copy = 0; e_lp_wb = 0; e_mem_wb = 0;
    place = (ref_mode == MODE_PLACEMENT);
    lph = lp_valid[s] && lp_tag[s] == t;
    hi  = find(s, t);
    hph = (hi >= 0);
    cnt_hit = place ? lph : (lph || hi == 0);
    ref_ctr = cnt_hit ? ref_ctr + 2 : ref_ctr - 1;
    if (ref_ctr > 15) ref_ctr = 15;
    if (ref_ctr < -15) ref_ctr = -15;
    if (ref_mode == MODE_PLACEMENT && ref_ctr < 0) ref_mode = MODE_CONVENTIONAL;
    else if (ref_mode == MODE_CONVENTIONAL && ref_ctr > 0) ref_mode = MODE_PLACEMENT;
    if (lph) begin
      e_lp_hit = 1;
      if (we) lp_dirty[s] = 1;
      ci = find(s, lp_tag[s]);
      if (ci >= 0) touch(s, ci);
    end else if (hph && !place) begin
      e_hp_hit = 1;
      if (we) hp[s][hi].dirty = 1;
      touch(s, hi);
    end else begin
      if (hph) e_hp_hit = 1; else e_miss = 1;
      if (place && lp_valid[s] && lp_dirty[s]) begin
        ci = find(s, lp_tag[s]);
        if (ci >= 0) begin hp[s][ci].dirty = 1; e_lp_wb = 1; end
        else e_mem_wb++;
      end
      if (hph) begin
        touch(s, hi);
      end else begin
        if (hp[s].size() == int'(HP_WAYS)) begin
          if (hp[s][$].dirty) e_mem_wb++;
          void'(hp[s].pop_back());
        end
        hp[s].push_front('{tag: t, dirty: !place && we});
      end
      if (place) begin
        e_copy = 1;
        lp_valid[s] = 1; lp_tag[s] = t; lp_dirty[s] = we;
      end
    end
  endtask

  // observed events of one request
  int o_lp_hit, o_hp_hit, o_miss, o_copy, o_lp_wb, o_mem_wb;
  always @(posedge clk) begin
    if (rst_n) begin
      o_lp_hit += int'(evt_lp_hit);
      o_hp_hit += int'(evt_hp_hit);
      o_miss   += int'(evt_miss);
      o_copy   += int'(evt_copy);
      o_lp_wb  += int'(evt_lp_wb);
      o_mem_wb += int'(evt_mem_wb);
    end
  end

  int n_orphan = 0, n_lp_wb = 0, n_conv = 0, n_place_copy = 0;

  task automatic access(input logic we, input logic [ADDR_W-1:0] addr,
                        input line_t wdata, input mask_t wmask);
    logic [LADDR_W-1:0] la;
    int lat;
    la = addr[ADDR_W-1:OFF_W];
    ref_access(int'(addr[OFF_W +: SET_W]), addr[OFF_W+SET_W +: TAG_W], we);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wdata; req_wmask = wmask;
    o_lp_hit = 0; o_hp_hit = 0; o_miss = 0; o_copy = 0; o_lp_wb = 0; o_mem_wb = 0;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid && lat < 5000) begin @(negedge clk); lat++; end
    @(negedge clk);  // let trailing strobes be counted
    checks++;
    if (o_lp_hit != e_lp_hit || o_hp_hit != e_hp_hit || o_miss != e_miss ||
        o_copy != e_copy || o_lp_wb != e_lp_wb || o_mem_wb != e_mem_wb) begin
      failures++;
      $display("line %h: events lp/hp/miss/copy/lpwb/memwb %0d%0d%0d%0d%0d%0d expected %0d%0d%0d%0d%0d%0d",
               la, o_lp_hit, o_hp_hit, o_miss, o_copy, o_lp_wb, o_mem_wb,
               e_lp_hit, e_hp_hit, e_miss, e_copy, e_lp_wb, e_mem_wb);
    end
    checks++;
    if (int'(ctr) != ref_ctr || mode != ref_mode) begin
      failures++;
      $display("counter %0d mode %s, expected %0d %s", ctr, mode.name(), ref_ctr, ref_mode.name());
    end
    if (e_mem_wb > 0 && e_miss == 0) n_orphan++;
    if (e_lp_wb > 0) n_lp_wb++;
    if (ref_mode == MODE_CONVENTIONAL) n_conv++;
    if (e_copy > 0 && e_hp_hit > 0) n_place_copy++;
    if (we) golden[la] = merge_line(golden_line(la), wdata, wmask);
    else begin
      checks++;
      if (rsp_rdata != golden_line(la) || rsp_lp != (e_lp_hit == 1)) begin
        failures++;
        $display("read of line %h returned wrong data or region", la);
      end
    end
  endtask

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 12; p++) begin
      int lines;
      lines = (p % 3 == 0) ? 24 : (p % 3 == 1) ? 3 : 12;
      for (int i = 0; i < 250; i++) begin
        set_t s;
        tag_t t;
        s = set_t'(($urandom % 3) * 777 + 1);
        t = tag_t'(50 + $urandom % lines);
        access(($urandom % 100) < 35, {t, s, 6'($urandom)}, rand_line(),
               ($urandom % 2) ? '1 : mask_t'({$urandom, $urandom}));
      end
    end
    checks++;
    if (bad_region != 0) begin
      failures++;
      $display("%0d array operations used the wrong interconnect", bad_region);
    end
    checks++;
    if (n_orphan == 0 || n_lp_wb == 0 || n_conv == 0 || n_place_copy == 0) begin
      failures++;
      $display("a policy case never happened");
    end
    $display("dirty way-0 blocks without copy %0d, with copy %0d, conventional-mode requests %0d, copies from high-power ways %0d",
             n_orphan, n_lp_wb, n_conv, n_place_copy);
    $display("array operations: low-power %0d high-power %0d; memory reads %0d writes %0d",
             lp_ops, hp_ops, mem_reads, mem_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
