// tb_nupa_bank: end-to-end test of the non-uniform power access cache bank at
// its full size (4 MB, 16 ways, 4096 sets, 64-byte lines), with a 300-cycle
// behavioural main memory.
//
// A random stream of byte-masked writes and line reads is run through the bank
// in three phases: a high-reuse phase (few lines per set, placement mode), a
// streaming phase (many lines per set, so way 0 is seldom hit again and the
// counter switches copying off) and a second high-reuse phase (the counter
// switches copying back on). Every read is compared with a reference copy of
// memory; at the end every line touched is read back. Read hits in the
// low-power way, and high-power read hits in conventional mode, must answer in
// 8 cycles plus any cycles the controller spent waiting for a busy low-swing
// bus. Each mechanism of the design is counted and must occur at least once.
module tb_nupa_bank;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [ADDR_W-1:0] req_addr = '0;
  line_t req_wdata = '0, rsp_rdata;
  mask_t req_wmask = '0;
  logic rsp_valid, rsp_lp;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [LADDR_W-1:0] mem_req_addr;
  line_t mem_req_wdata, mem_rsp_rdata;
  mode_e mode;
  logic signed [4:0] ctr;
  logic evt_lp_hit, evt_hp_hit, evt_miss, evt_copy, evt_lp_wb, evt_mem_wb, evt_stall;
  int unsigned mem_reads, mem_writes;

  int checks = 0, failures = 0;

  nupa_bank dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we), .req_addr_i(req_addr),
    .req_wdata_i(req_wdata), .req_wmask_i(req_wmask),
    .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata), .rsp_lp_o(rsp_lp),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
    .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
    .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_rdata_i(mem_rsp_rdata),
    .mode_o(mode), .ctr_o(ctr),
    .evt_lp_hit_o(evt_lp_hit), .evt_hp_hit_o(evt_hp_hit), .evt_miss_o(evt_miss),
    .evt_copy_o(evt_copy), .evt_lp_wb_o(evt_lp_wb), .evt_mem_wb_o(evt_mem_wb),
    .evt_stall_o(evt_stall)
  );

  main_memory_model u_mem (
    .clk, .rst_n,
    .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready), .req_we_i(mem_req_we),
    .req_addr_i(mem_req_addr), .req_wdata_i(mem_req_wdata),
    .rsp_valid_o(mem_rsp_valid), .rsp_rdata_o(mem_rsp_rdata),
    .reads_o(mem_reads), .writes_o(mem_writes)
  );

  always #5 clk = ~clk;

  // watchdog: 2,000,000 cycles
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // same pattern as the memory model holds for lines never written
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

  // ------------------------------------------------------------ event counts
  int n_lp_hit = 0, n_hp_hit_place = 0, n_hp_hit_conv = 0, n_miss_place = 0, n_miss_conv = 0;
  int n_copy = 0, n_lp_wb = 0, n_mem_wb = 0, n_stall = 0, n_to_conv = 0, n_to_place = 0;
  int n_lookups = 0, n_lookups_place = 0;
  mode_e mode_prev;
  // per request
  logic r_lp_hit, r_hp_hit, r_place;
  int r_stall;

  always @(posedge clk) begin
    if (rst_n) begin
      if (evt_lp_hit) n_lp_hit++;
      if (evt_hp_hit && mode == MODE_PLACEMENT) n_hp_hit_place++;
      if (evt_hp_hit && mode == MODE_CONVENTIONAL) n_hp_hit_conv++;
      if (evt_miss && mode == MODE_PLACEMENT) n_miss_place++;
      if (evt_miss && mode == MODE_CONVENTIONAL) n_miss_conv++;
      if (evt_lp_hit || evt_hp_hit || evt_miss) begin
        n_lookups++;
        if (mode == MODE_PLACEMENT) n_lookups_place++;
        r_lp_hit = evt_lp_hit;
        r_hp_hit = evt_hp_hit;
        r_place  = (mode == MODE_PLACEMENT);
      end
      if (evt_copy) n_copy++;
      if (evt_lp_wb) n_lp_wb++;
      if (evt_mem_wb) n_mem_wb++;
      if (evt_stall) begin n_stall++; r_stall++; end
      if (mode != mode_prev) begin
        if (mode == MODE_CONVENTIONAL) n_to_conv++; else n_to_place++;
      end
      mode_prev = mode;
    end
  end

  // ------------------------------------------------------------ requests
  task automatic access(input logic we, input logic [ADDR_W-1:0] addr,
                        input line_t wdata, input mask_t wmask);
    logic [LADDR_W-1:0] la;
    int lat;
    la = addr[ADDR_W-1:OFF_W];
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wdata; req_wmask = wmask;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    r_stall = 0;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      lat++;
      if (lat > 5000) break;
    end
    if (we) begin
      golden[la] = merge_line(golden_line(la), wdata, wmask);
    end else begin
      checks++;
      if (rsp_rdata !== golden_line(la)) begin
        failures++;
        $display("read data mismatch at line %h", la);
      end
      checks++;
      if (rsp_lp != r_lp_hit) begin
        failures++;
        $display("response region flag wrong at line %h", la);
      end
      if (r_lp_hit || (r_hp_hit && !r_place)) begin
        checks++;
        if (lat != 8 + r_stall) begin
          failures++;
          $display("hit latency %0d, expected %0d", lat, 8 + r_stall);
        end
      end
    end
  endtask

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  logic [ADDR_W-1:0] touched [$];

  task automatic phase(input int n, input int lines_per_set, input int write_pct);
    for (int i = 0; i < n; i++) begin
      logic [ADDR_W-1:0] a;
      logic we;
      mask_t m;
      set_t s;
      tag_t t;
      s = set_t'(($urandom % 4) * 1000 + 7);
      t = tag_t'(100 + $urandom % lines_per_set);
      a = {t, s, 6'($urandom)};
      we = ($urandom % 100) < write_pct;
      m = ($urandom % 3 == 0) ? '1 : mask_t'({$urandom, $urandom});
      access(we, a, rand_line(), m);
      touched.push_back(a);
    end
  endtask

  initial begin
    mode_prev = MODE_PLACEMENT;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);

    // high reuse: 3 lines per set
    phase(400, 3, 30);
    $display("after reuse phase: mode %s ctr %0d", mode.name(), ctr);
    // streaming: 40 lines per set, more than the 16 ways
    phase(700, 40, 30);
    $display("after streaming phase: mode %s ctr %0d", mode.name(), ctr);
    // high reuse again
    phase(400, 2, 30);
    $display("after second reuse phase: mode %s ctr %0d", mode.name(), ctr);
    // back-to-back writes to the low-power way keep the low-swing bus busy
    for (int i = 0; i < 10; i++) access(1'b1, {tag_t'(100), set_t'(7), 6'd0}, rand_line(), '1);
    // read back everything
    foreach (touched[i]) access(1'b0, touched[i], '0, '0);

    checks++;
    if (mem_reads != n_miss_place + n_miss_conv) begin
      failures++;
      $display("memory reads %0d differ from misses %0d", mem_reads, n_miss_place + n_miss_conv);
    end

    $display("lookups %0d (placement mode %0d)", n_lookups, n_lookups_place);
    $display("low-power hits %0d, high-power hits placement/conventional %0d/%0d",
             n_lp_hit, n_hp_hit_place, n_hp_hit_conv);
    $display("misses placement/conventional %0d/%0d, copies to way 0 %0d",
             n_miss_place, n_miss_conv, n_copy);
    $display("way-0 write-backs to high-power copy %0d, memory write-backs %0d",
             n_lp_wb, n_mem_wb);
    $display("low-swing bus stall cycles %0d, switches to conventional %0d, to placement %0d",
             n_stall, n_to_conv, n_to_place);
    $display("memory reads %0d writes %0d", mem_reads, mem_writes);

    checks++;
    if (n_lp_hit == 0 || n_hp_hit_place == 0 || n_hp_hit_conv == 0 || n_miss_place == 0 ||
        n_miss_conv == 0 || n_copy == 0 || n_lp_wb == 0 || n_mem_wb == 0 || n_stall == 0 ||
        n_to_conv == 0 || n_to_place == 0) begin
      failures++;
      $display("a mechanism of the bank never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
