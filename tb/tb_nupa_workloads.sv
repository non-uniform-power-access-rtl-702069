// tb_nupa_workloads: runs synthetic request streams shaped like the published
// per-benchmark statistics through two full-size banks side by side, one with
// dynamic reconfiguration (the default) and one with smart placement only.
//
// Each stream is built from one benchmark's average reuse count N (way-0 hits
// per block brought into way 0, from the published access statistics): every
// request re-touches the block last used in its set with probability
// N/(N+1) and otherwise touches another of 24 blocks of the set, so a block
// brought into way 0 is hit about N times before it is replaced. 20% of the
// requests are writes. For each stream the testbench measures the way-0 hit
// rate, the share of lookups made in placement mode, and a bank energy estimate
// from the published per-access energies of a 4 MB bank: 0.185 nJ for an
// access over the H-tree and 0.014 nJ over the low-swing bus. The baseline is a
// conventional bank that spends one H-tree access per request, per fill and
// per write-back.
//
// Checks, besides the data of every read:
//  * placement-only bank: every lookup in placement mode, and a way-0 hit
//    rate within 5 points of N/(N+1);
//  * streams with N >= 9: placement mode more than 95% of the time and energy
//    saving above 50% with reconfiguration;
//  * streams with N <= 0.5: placement mode less than 30% of the time, fewer
//    than half the copies into way 0 of the placement-only bank, and an energy
//    saving still above 10%.
//  * two directed read-only streams that touch every block resident in a
//    high-power way N = 1 and N = 2 times: the placement-only bank must spend
//    exactly one H-tree read plus N low-swing operations per block (the
//    Duplicate policy's cost H + L + (N - 1) x L), which loses energy at N = 1
//    and saves at N = 2.
// Each stream uses its own range of block addresses, so blocks written back to
// the memory model by one stream never meet the next stream.
module tb_nupa_workloads;
  import nupa_pkg::*;

  localparam int NBANK = 2;   // 0: dynamic reconfiguration, 1: placement only
  localparam int NREQ  = 1500;
  localparam int NBENCH = 9;
  localparam real E_HP = 0.185;  // nJ per access over the H-tree
  localparam real E_LP = 0.014;  // nJ per access over the low-swing bus

  string bench_name [NBENCH] = '{"eon", "gzip", "crafty", "gcc", "apsi", "ammp", "mcf", "art", "lucas"};
  real   bench_reuse [NBENCH] = '{39.7, 36.7, 9.7, 4.1, 2.5, 1.4, 0.7, 0.5, 0.4};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // the current stream
  logic [ADDR_W-1:0] s_addr [NREQ];
  logic              s_we   [NREQ];
  line_t             s_data [NREQ];
  int                s_len = NREQ;  // requests in the stream
  int                s_mark = 0;    // request at which the operation counts are sampled
  int                m_lp_ops [NBANK], m_hp_ops [NBANK];

  // per-bank results of the current stream
  int  n_lookup [NBANK], n_lp_hit [NBANK], n_miss [NBANK], n_place [NBANK];
  int  n_copy [NBANK], n_mem_wb [NBANK], n_lp_ops [NBANK], n_hp_ops [NBANK], n_bad [NBANK];
  bit  done [NBANK];
  event start;

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
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

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic req_valid = 0, req_ready, req_we = 0, rsp_valid, rsp_lp;
    logic [ADDR_W-1:0] req_addr = '0;
    line_t req_wdata = '0, rsp_rdata;
    logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
    logic [LADDR_W-1:0] mem_req_addr;
    line_t mem_req_wdata, mem_rsp_rdata;
    mode_e mode;
    logic signed [4:0] ctr;
    logic e_lp_hit, e_hp_hit, e_miss, e_copy, e_lp_wb, e_mem_wb, e_stall;
    int unsigned mem_reads, mem_writes;
    line_t golden [logic [LADDR_W-1:0]];

    nupa_bank #(.DYN_RECONFIG(b == 0)) dut (
      .clk, .rst_n,
      .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we), .req_addr_i(req_addr),
      .req_wdata_i(req_wdata), .req_wmask_i('1),
      .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata), .rsp_lp_o(rsp_lp),
      .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
      .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
      .mem_rsp_valid_i(mem_rsp_valid), .mem_rsp_rdata_i(mem_rsp_rdata),
      .mode_o(mode), .ctr_o(ctr),
      .evt_lp_hit_o(e_lp_hit), .evt_hp_hit_o(e_hp_hit), .evt_miss_o(e_miss),
      .evt_copy_o(e_copy), .evt_lp_wb_o(e_lp_wb), .evt_mem_wb_o(e_mem_wb), .evt_stall_o(e_stall)
    );

    main_memory_model u_mem (
      .clk, .rst_n,
      .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready), .req_we_i(mem_req_we),
      .req_addr_i(mem_req_addr), .req_wdata_i(mem_req_wdata),
      .rsp_valid_o(mem_rsp_valid), .rsp_rdata_o(mem_rsp_rdata),
      .reads_o(mem_reads), .writes_o(mem_writes)
    );

    // count lookups and the array operations on each interconnect
    always @(posedge clk) begin
      if (rst_n) begin
        if (e_lp_hit || e_hp_hit || e_miss) begin
          n_lookup[b]++;
          if (mode == MODE_PLACEMENT) n_place[b]++;
        end
        if (e_lp_hit) n_lp_hit[b]++;
        if (e_miss) n_miss[b]++;
        if (e_mem_wb) n_mem_wb[b]++;
        if (e_copy) n_copy[b]++;
        if (dut.u_switch.lp_valid_o && dut.u_switch.lp_ready_i) n_lp_ops[b]++;
        if (dut.u_switch.hp_valid_o && dut.u_switch.hp_ready_i) n_hp_ops[b]++;
      end
    end

    // run the stream
    initial begin
      forever begin
        @start;
        golden.delete();
        for (int i = 0; i < s_len; i++) begin
          logic [LADDR_W-1:0] la;
          la = s_addr[i][ADDR_W-1:OFF_W];
          @(negedge clk);
          req_valid = 1; req_we = s_we[i]; req_addr = s_addr[i]; req_wdata = s_data[i];
          while (!req_ready) @(negedge clk);
          // the bank is idle here: every operation of earlier requests is counted
          if (i == s_mark) begin
            m_lp_ops[b] = n_lp_ops[b];
            m_hp_ops[b] = n_hp_ops[b];
          end
          @(negedge clk);
          req_valid = 0;
          while (!rsp_valid) @(negedge clk);
          if (s_we[i]) golden[la] = s_data[i];
          else if (rsp_rdata != (golden.exists(la) ? golden[la] : init_line(la))) n_bad[b]++;
        end
        done[b] = 1;
      end
    end
  end

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < int'(LINE_BITS / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // reset both banks and run the current stream on each
  task automatic run_stream();
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NBANK; b++) begin
      n_lookup[b] = 0; n_lp_hit[b] = 0; n_miss[b] = 0; n_place[b] = 0; n_copy[b] = 0;
      n_mem_wb[b] = 0; n_lp_ops[b] = 0; n_hp_ops[b] = 0; n_bad[b] = 0; done[b] = 0;
    end
    -> start;
    wait (done[0] && done[1]);
  endtask

  initial begin
    for (int k = 0; k < NBENCH; k++) begin
      real p_new, hit_rate [NBANK], place_share [NBANK], saving [NBANK], target;
      tag_t cur [16];
      // build the stream
      p_new = 1.0 / (bench_reuse[k] + 1.0);
      for (int s = 0; s < 16; s++) cur[s] = tag_t'(200 + 32 * k + $urandom % 24);
      for (int i = 0; i < NREQ; i++) begin
        int s;
        s = $urandom % 16;
        if (real'($urandom % 100000) / 100000.0 < p_new) begin
          tag_t t;
          do t = tag_t'(200 + 32 * k + $urandom % 24); while (t == cur[s]);
          cur[s] = t;
        end
        s_addr[i] = {cur[s], set_t'(s * 256 + 3), 6'($urandom)};
        s_we[i]   = ($urandom % 100) < 20;
        s_data[i] = rand_line();
      end
      s_len = NREQ;
      s_mark = 0;
      run_stream();
      for (int b = 0; b < NBANK; b++) begin
        real e_nupa, e_base;
        hit_rate[b]    = real'(n_lp_hit[b]) / real'(n_lookup[b]);
        place_share[b] = real'(n_place[b]) / real'(n_lookup[b]);
        e_nupa = real'(n_lp_ops[b]) * E_LP + real'(n_hp_ops[b]) * E_HP;
        e_base = real'(n_lookup[b] + n_miss[b] + n_mem_wb[b]) * E_HP;
        saving[b] = 1.0 - e_nupa / e_base;
        checks++;
        if (n_bad[b] != 0) begin
          failures++;
          $display("%s bank %0d: %0d reads returned wrong data", bench_name[k], b, n_bad[b]);
        end
      end
      target = bench_reuse[k] / (bench_reuse[k] + 1.0);
      $display("%-7s reuse %5.1f | reconfig: LP hit %5.1f%% placement %5.1f%% saving %6.1f%% | placement only: LP hit %5.1f%% (expect %5.1f%%) saving %6.1f%% | copies %0d vs %0d",
               bench_name[k], bench_reuse[k], 100.0 * hit_rate[0], 100.0 * place_share[0],
               100.0 * saving[0], 100.0 * hit_rate[1], 100.0 * target, 100.0 * saving[1], n_copy[0], n_copy[1]);
      checks++;
      if (n_place[1] != n_lookup[1]) begin
        failures++;
        $display("  placement-only bank left placement mode");
      end
      checks++;
      if (hit_rate[1] < target - 0.05 || hit_rate[1] > target + 0.05) begin
        failures++;
        $display("  way-0 hit rate off the reuse count");
      end
      if (bench_reuse[k] >= 9.0) begin
        checks++;
        if (place_share[0] <= 0.95 || saving[0] <= 0.50) begin
          failures++;
          $display("  high-reuse stream left placement mode or saved too little");
        end
      end
      if (bench_reuse[k] <= 0.5) begin
        checks++;
        if (place_share[0] >= 0.30 || 2 * n_copy[0] >= n_copy[1] || saving[0] <= 0.10) begin
          failures++;
          $display("  low-reuse stream not handled by reconfiguration");
        end
      end
    end
    // Break-even of the Duplicate policy for read-only blocks: the first touch
    // of a block held only in a high-power way costs H + L (read it, copy it
    // into way 0), each further touch L, against N x H in a conventional bank.
    // Copying pays for N > 1 + L / (H - L) = 1.08 with these energies. Each set
    // is first filled with 15 blocks, one per high-power way; then every block
    // is touched N times in a row and the placement-only bank's operations are
    // compared with that count.
    for (int n = 1; n <= 2; n++) begin
      int idx, lp, hp;
      real e_nupa, e_base;
      idx = 0;
      for (int pass = 0; pass < 2; pass++) begin
        if (pass == 1) s_mark = idx;
        for (int s = 0; s < 16; s++)
          for (int j = 0; j < HP_WAYS; j++)
            for (int r = 0; r < (pass == 0 ? 1 : n); r++) begin
              s_addr[idx] = {tag_t'(200 + 32 * (NBENCH + n) + j), set_t'(s * 256 + 5), 6'(0)};
              s_we[idx]   = 1'b0;
              s_data[idx] = '0;
              idx++;
            end
      end
      s_len = idx;
      run_stream();
      lp = n_lp_ops[1] - m_lp_ops[1];
      hp = n_hp_ops[1] - m_hp_ops[1];
      e_nupa = real'(lp) * E_LP + real'(hp) * E_HP;
      e_base = real'(16 * HP_WAYS * n) * E_HP;
      $display("break-even N=%0d: %0d low-swing and %0d H-tree operations for %0d blocks, saving %6.1f%%",
               n, lp, hp, 16 * HP_WAYS, 100.0 * (1.0 - e_nupa / e_base));
      checks++;
      if (n_bad[0] != 0 || n_bad[1] != 0 || lp != 16 * HP_WAYS * n || hp != 16 * HP_WAYS ||
          (n == 1 && e_nupa <= e_base) || (n == 2 && e_nupa >= e_base)) begin
        failures++;
        $display("  operation counts differ from H + L + (N - 1) x L per block");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
