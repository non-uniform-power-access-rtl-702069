// lru_array: true-LRU replacement state of the high-power ways of every set.
//
// Replacement in the high-power region (ways 1..NWAYS-1) is LRU, as in a
// conventional cache; the low-power way 0 is not part of the LRU order because
// under the Duplicate policy it always holds a copy of the block touched last.
// Each set keeps one age per high-power way, a permutation of 0..NHP-1 with 0 the
// most recently used. The ages are held in a RAM. After reset a sweep sets the
// ages of every set to 0,1,2,... one set per cycle; init_done_o rises when it
// is over, and the array may not be used before.
//
// Interface: rd_en_i/rd_set_i give, one cycle later, lru_way_o (oldest way) and
// mru_way_o (youngest way), both as global way numbers 1..NWAYS-1. touch_en_i
// makes touch_way_i (a global high-power way number) the most recently used
// way of the set read last; every way that was younger ages by one. The new
// ages are computed from the ages read at the lookup, which are kept and
// updated by each touch, so a request may touch its set any number of times
// without reading it again; the controller handles one set at a time.
module lru_array
  import nupa_pkg::*;
#(
  parameter int unsigned NSETS = SETS,
  parameter int unsigned NWAYS = WAYS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en_i,
  input  logic [$clog2(NSETS)-1:0] rd_set_i,
  output logic [$clog2(NWAYS)-1:0] lru_way_o,
  output logic [$clog2(NWAYS)-1:0] mru_way_o,
  input  logic                     touch_en_i,
  input  logic [$clog2(NWAYS)-1:0] touch_way_i,
  output logic                     init_done_o
);

  localparam int unsigned NHP   = NWAYS - 1;
  localparam int unsigned AGE_W = $clog2(NHP);
  localparam int unsigned WW    = $clog2(NWAYS);
  localparam int unsigned SW    = $clog2(NSETS);

  typedef logic [NHP-1:0][AGE_W-1:0] ages_t;

  ages_t         ages_mem [NSETS];
  ages_t         ram_rd_data, work_q, cur_ages, touched, reset_ages;
  logic [SW-1:0] rd_set_q, init_set;
  logic          rd_pending;

  always_comb
    for (int j = 0; j < int'(NHP); j++) reset_ages[j] = AGE_W'(j);

  // ages of the set read last: straight from the RAM in the cycle after the
  // read, from the working copy afterwards
  assign cur_ages = rd_pending ? ram_rd_data : work_q;

  // new ages after a touch
  always_comb begin
    logic [AGE_W-1:0] old_age;
    old_age = cur_ages[touch_way_i - WW'(1)];
    touched = cur_ages;
    for (int j = 0; j < int'(NHP); j++) begin
      if (WW'(j + 1) == touch_way_i)   touched[j] = '0;
      else if (cur_ages[j] < old_age) touched[j] = cur_ages[j] + AGE_W'(1);
    end
  end

  // reset sweep
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_set    <= '0;
      init_done_o <= 1'b0;
      rd_pending  <= 1'b0;
    end else begin
      rd_pending <= rd_en_i;
      if (!init_done_o) begin
        init_set <= init_set + SW'(1);
        if (init_set == SW'(NSETS - 1)) init_done_o <= 1'b1;
      end
    end
  end

  // RAM with one write port (sweep or touch) and one synchronous read port
  always_ff @(posedge clk) begin
    if (!init_done_o)    ages_mem[init_set] <= reset_ages;
    else if (touch_en_i) ages_mem[rd_set_q] <= touched;
    if (rd_en_i) begin
      ram_rd_data <= ages_mem[rd_set_i];
      rd_set_q    <= rd_set_i;
    end
  end

  always_ff @(posedge clk) begin
    if (touch_en_i)      work_q <= touched;
    else if (rd_pending) work_q <= ram_rd_data;
  end

  always_comb begin
    lru_way_o = WW'(1);
    mru_way_o = WW'(1);
    for (int j = 0; j < int'(NHP); j++) begin
      if (cur_ages[j] == AGE_W'(NHP - 1)) lru_way_o = WW'(j + 1);
      if (cur_ages[j] == '0)              mru_way_o = WW'(j + 1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) touch_en_i |-> touch_way_i != '0)
    else $error("the low-power way has no LRU age");
  assert property (@(posedge clk) disable iff (!rst_n) !init_done_o |-> !rd_en_i && !touch_en_i)
    else $error("LRU array used during its reset sweep");

endmodule
