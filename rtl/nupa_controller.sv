// nupa_controller: cache controller of the non-uniform power access bank.
//
// It serves one request at a time. A request first reads the tags of all 16
// ways of its set in parallel (tag_array) together with the LRU order of the
// high-power ways (lru_array). The outcome then decides the data-array
// operations, which go through the region switch to the low-power way 0 (over
// the low-swing bus) or to a high-power way 1..15 (over the H-tree):
//
//  * hit in the low-power way: read or write way 0 only. A copy of the block in
//    a high-power way is ignored (its LRU age is refreshed).
//  * hit in high-power way k, placement mode (Duplicate policy): if the block
//    now in way 0 is dirty it is read and written into its high-power copy (or
//    to main memory if LRU has already dropped that copy); a clean one is simply
//    dropped. Then way k is read, answered, and copied into way 0, which becomes
//    clean (dirty if the request is a write, whose bytes go to the way-0 copy).
//  * miss, placement mode: the way-0 block is retired as above, the LRU
//    high-power way is written back to memory if dirty, the line is fetched
//    and written both into that high-power way and into way 0.
//  * conventional mode: high-power hits are served in place and misses fill the
//    LRU high-power way only; way 0 is left alone except when it hits.
//
// The mode comes from reconfig_counter: in placement mode a low-power hit counts
// up and anything else down; in conventional mode a hit on the set's most
// recently used block (way 0, or the youngest high-power way) counts up.
// The Duplicate policy, the write-back of dirty way-0 blocks to their copy, the
// second tag search for that copy and the counter rules follow the published
// design. One request at a time, posted (unacknowledged) array writes, the
// fallback to memory for a dirty way-0 block without a copy, and letting
// writes carry whole-line data with byte enables are this design's own choices.
// The search for the copy uses the tags read at lookup, so it costs no cycle.
//
// Timing: after reset the tag and LRU arrays clear themselves, one set per
// cycle (4096 cycles), before req_ready_o first rises. A request is accepted
// in IDLE (req_ready_o); the tags are read in the
// next cycle (LOOKUP) and array operations start in the one after. A read
// response arrives 5 cycles after the array read is issued; rsp_valid_o is
// raised one cycle later. A low-power read hit thus answers 8 cycles after
// acceptance, as does a conventional high-power read hit. Writes are answered
// once their array write is issued. mem_* is a simple valid/ready request port
// to main memory plus a response strobe for reads.
module nupa_controller
  import nupa_pkg::*;
#(
  parameter bit DYN_RECONFIG = 1'b1  // 0: copy on every touch, never switch off
) (
  input  logic                clk,
  input  logic                rst_n,
  // requests from the processor side
  input  logic                req_valid_i,
  output logic                req_ready_o,
  input  logic                req_we_i,
  input  logic [ADDR_W-1:0]   req_addr_i,
  input  line_t               req_wdata_i,
  input  mask_t               req_wmask_i,
  output logic                rsp_valid_o,
  output line_t               rsp_rdata_o,
  output logic                rsp_lp_o,      // served from the low-power way
  // data-array operations, to the region switch
  output logic                arr_valid_o,
  output region_e             arr_region_o,
  output arr_req_t            arr_req_o,
  input  logic                arr_ready_i,
  input  logic                arr_rsp_valid_i,
  input  line_t               arr_rsp_rdata_i,
  // main memory
  output logic                mem_req_valid_o,
  input  logic                mem_req_ready_i,
  output logic                mem_req_we_o,
  output logic [LADDR_W-1:0]  mem_req_addr_o,
  output line_t               mem_req_wdata_o,
  input  logic                mem_rsp_valid_i,
  input  line_t               mem_rsp_rdata_i,
  // mode and event strobes
  output mode_e               mode_o,
  output logic signed [4:0]   ctr_o,
  output logic                evt_lp_hit_o,  // lookup hit in the low-power way
  output logic                evt_hp_hit_o,  // lookup hit in a high-power way only
  output logic                evt_miss_o,    // lookup missed the bank
  output logic                evt_copy_o,    // block copied into the low-power way
  output logic                evt_lp_wb_o,   // dirty way-0 block written to its high-power copy
  output logic                evt_mem_wb_o,  // dirty line written back to memory
  output logic                evt_stall_o    // array operation held by a busy interconnect
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_LP_ACCESS, S_HP_ACCESS, S_LPV_RD, S_LPV_WB,
    S_HPV_RD, S_HPV_WB, S_MEM_RD, S_MEM_WAIT, S_HP_RD, S_FILL_HP, S_FILL_LP,
    S_WAIT_RD, S_RESP
  } state_e;

  state_e state, ret_state;

  // the request
  logic  op_we;
  tag_t  op_tag;
  set_t  op_set;
  line_t op_wdata;
  mask_t op_wmask;

  // local copy of the set's tag state, kept current as it is updated
  tag_t [WAYS-1:0] tags_q;
  logic [WAYS-1:0] valid_q, dirty_q;
  way_t  hit_way_q, victim_q, copy_way_q;
  logic  lp_hit_q, hp_hit_q, copy_hit_q, place_q;
  line_t line_q;

  // tag and LRU arrays
  tag_t [WAYS-1:0] rd_tag;
  logic [WAYS-1:0] rd_valid, rd_dirty;
  logic  tag_wr_en, tag_wr_valid, tag_wr_dirty;
  way_t  tag_wr_way;
  tag_t  tag_wr_tag;
  way_t  lru_way, mru_way;
  logic  touch_en;
  way_t  touch_way;
  logic  ctr_hit, ctr_miss;
  logic  accept;
  logic  tag_init_done, lru_init_done;

  assign accept = req_valid_i && req_ready_o;

  tag_array u_tags (
    .clk, .rst_n,
    .rd_en_i(accept), .rd_set_i(req_addr_i[OFF_W +: SET_W]),
    .rd_tag_o(rd_tag), .rd_valid_o(rd_valid), .rd_dirty_o(rd_dirty), .init_done_o(tag_init_done),
    .wr_en_i(tag_wr_en), .wr_set_i(op_set), .wr_way_i(tag_wr_way),
    .wr_tag_i(tag_wr_tag), .wr_valid_i(tag_wr_valid), .wr_dirty_i(tag_wr_dirty)
  );

  lru_array u_lru (
    .clk, .rst_n,
    .rd_en_i(accept), .rd_set_i(req_addr_i[OFF_W +: SET_W]),
    .lru_way_o(lru_way), .mru_way_o(mru_way),
    .touch_en_i(touch_en), .touch_way_i(touch_way), .init_done_o(lru_init_done)
  );

  reconfig_counter #(.DYN_RECONFIG(DYN_RECONFIG)) u_ctr (
    .clk, .rst_n, .hit_i(ctr_hit), .miss_i(ctr_miss), .ctr_o(ctr_o), .mode_o(mode_o)
  );

  // ---------------------------------------------------------------- lookup
  logic lk_lp_hit, lk_hp_hit, lk_copy_hit, lk_free;
  way_t lk_hit_way, lk_copy_way, lk_free_way, lk_victim;

  always_comb begin
    lk_lp_hit   = rd_valid[0] && (rd_tag[0] == op_tag);
    lk_hp_hit   = 1'b0;
    lk_hit_way  = '0;
    lk_copy_hit = 1'b0;
    lk_copy_way = '0;
    lk_free     = 1'b0;
    lk_free_way = '0;
    for (int w = int'(WAYS) - 1; w >= int'(LP_WAYS); w--) begin
      if (rd_valid[w] && rd_tag[w] == op_tag) begin
        lk_hp_hit  = 1'b1;
        lk_hit_way = way_t'(w);
      end
      // second search: the high-power copy of the block held in way 0
      if (rd_valid[0] && rd_valid[w] && rd_tag[w] == rd_tag[0]) begin
        lk_copy_hit = 1'b1;
        lk_copy_way = way_t'(w);
      end
      if (!rd_valid[w]) begin
        lk_free     = 1'b1;
        lk_free_way = way_t'(w);
      end
    end
    lk_victim = lk_free ? lk_free_way : lru_way;
  end

  function automatic logic [WAYS-1:0] hp_match(tag_t [WAYS-1:0] t, logic [WAYS-1:0] v, tag_t tag);
    logic [WAYS-1:0] m;
    for (int w = 0; w < int'(WAYS); w++) m[w] = (w >= int'(LP_WAYS)) && v[w] && (t[w] == tag);
    return m;
  endfunction

  // next state after the way-0 block has been retired
  function automatic state_e after_retire(logic hp_hit, logic vdirty);
    if (hp_hit)      return S_HP_RD;
    else if (vdirty) return S_HPV_RD;
    else             return S_MEM_RD;
  endfunction

  // ---------------------------------------------------------------- outputs
  logic  arr_fire, mem_fire;
  line_t fill_line;

  assign arr_fire  = arr_valid_o && arr_ready_i;
  assign mem_fire  = mem_req_valid_o && mem_req_ready_i;
  assign fill_line = op_we ? merge_line(line_q, op_wdata, op_wmask) : line_q;

  always_comb begin
    req_ready_o     = (state == S_IDLE) && tag_init_done && lru_init_done;
    arr_valid_o     = 1'b0;
    arr_region_o    = REGION_HP;
    arr_req_o       = '{we: 1'b0, way: '0, set: op_set, wdata: line_q, wmask: '1};
    mem_req_valid_o = 1'b0;
    mem_req_we_o    = 1'b0;
    mem_req_addr_o  = {op_tag, op_set};
    mem_req_wdata_o = line_q;
    tag_wr_en       = 1'b0;
    tag_wr_way      = '0;
    tag_wr_tag      = op_tag;
    tag_wr_valid    = 1'b1;
    tag_wr_dirty    = 1'b0;
    touch_en        = 1'b0;
    touch_way       = hit_way_q;
    ctr_hit         = 1'b0;
    ctr_miss        = 1'b0;
    evt_lp_hit_o    = 1'b0;
    evt_hp_hit_o    = 1'b0;
    evt_miss_o      = 1'b0;
    evt_copy_o      = 1'b0;
    evt_lp_wb_o     = 1'b0;
    evt_mem_wb_o    = 1'b0;

    unique case (state)
      S_LOOKUP: begin
        evt_lp_hit_o = lk_lp_hit;
        evt_hp_hit_o = !lk_lp_hit && lk_hp_hit;
        evt_miss_o   = !lk_lp_hit && !lk_hp_hit;
        if (mode_o == MODE_PLACEMENT) begin
          ctr_hit  = lk_lp_hit;
          ctr_miss = !lk_lp_hit;
        end else begin
          ctr_hit  = lk_lp_hit || (lk_hp_hit && lk_hit_way == mru_way);
          ctr_miss = !ctr_hit;
        end
      end
      S_LP_ACCESS: begin
        arr_valid_o  = 1'b1;
        arr_region_o = REGION_LP;
        arr_req_o    = '{we: op_we, way: '0, set: op_set, wdata: op_wdata, wmask: op_wmask};
        if (arr_fire) begin
          touch_en  = copy_hit_q;
          touch_way = copy_way_q;
          if (op_we) begin
            tag_wr_en    = 1'b1;
            tag_wr_way   = '0;
            tag_wr_dirty = 1'b1;
          end
        end
      end
      S_HP_ACCESS: begin
        arr_valid_o = 1'b1;
        arr_req_o   = '{we: op_we, way: hit_way_q, set: op_set, wdata: op_wdata, wmask: op_wmask};
        if (arr_fire) begin
          touch_en = 1'b1;
          if (op_we) begin
            tag_wr_en    = 1'b1;
            tag_wr_way   = hit_way_q;
            tag_wr_dirty = 1'b1;
          end
        end
      end
      S_LPV_RD: begin
        arr_valid_o  = 1'b1;
        arr_region_o = REGION_LP;
        arr_req_o.way = '0;
      end
      S_LPV_WB: begin
        if (copy_hit_q) begin
          arr_valid_o   = 1'b1;
          arr_req_o     = '{we: 1'b1, way: copy_way_q, set: op_set, wdata: line_q, wmask: '1};
          tag_wr_en     = arr_fire;
          tag_wr_way    = copy_way_q;
          tag_wr_tag    = tags_q[0];
          tag_wr_dirty  = 1'b1;
          evt_lp_wb_o   = arr_fire;
        end else begin
          mem_req_valid_o = 1'b1;
          mem_req_we_o    = 1'b1;
          mem_req_addr_o  = {tags_q[0], op_set};
          evt_mem_wb_o    = mem_fire;
        end
      end
      S_HPV_RD: begin
        arr_valid_o   = 1'b1;
        arr_req_o.way = victim_q;
      end
      S_HPV_WB: begin
        mem_req_valid_o = 1'b1;
        mem_req_we_o    = 1'b1;
        mem_req_addr_o  = {tags_q[victim_q], op_set};
        evt_mem_wb_o    = mem_fire;
      end
      S_MEM_RD: mem_req_valid_o = 1'b1;
      S_HP_RD: begin
        arr_valid_o   = 1'b1;
        arr_req_o.way = hit_way_q;
        touch_en      = arr_fire;
      end
      S_FILL_HP: begin
        arr_valid_o  = 1'b1;
        arr_req_o    = '{we: 1'b1, way: victim_q, set: op_set,
                         wdata: place_q ? line_q : fill_line, wmask: '1};
        tag_wr_en    = arr_fire;
        tag_wr_way   = victim_q;
        tag_wr_dirty = !place_q && op_we;
        touch_en     = arr_fire;
        touch_way    = victim_q;
      end
      S_FILL_LP: begin
        arr_valid_o  = 1'b1;
        arr_region_o = REGION_LP;
        arr_req_o    = '{we: 1'b1, way: '0, set: op_set, wdata: fill_line, wmask: '1};
        tag_wr_en    = arr_fire;
        tag_wr_way   = '0;
        tag_wr_dirty = op_we;
        evt_copy_o   = arr_fire;
      end
      default: ;
    endcase
  end

  assign evt_stall_o = arr_valid_o && !arr_ready_i;
  assign rsp_valid_o = (state == S_RESP);
  assign rsp_rdata_o = line_q;
  assign rsp_lp_o    = lp_hit_q;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ret_state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (accept) state <= S_LOOKUP;
        S_LOOKUP: begin
          if (lk_lp_hit)
            state <= S_LP_ACCESS;
          else if (lk_hp_hit && mode_o == MODE_CONVENTIONAL)
            state <= S_HP_ACCESS;
          else if (mode_o == MODE_PLACEMENT && rd_valid[0] && rd_dirty[0])
            state <= S_LPV_RD;
          else
            state <= after_retire(lk_hp_hit, rd_valid[lk_victim] && rd_dirty[lk_victim]);
        end
        S_LP_ACCESS, S_HP_ACCESS:
          if (arr_fire) begin
            if (op_we) state <= S_RESP;
            else begin
              state     <= S_WAIT_RD;
              ret_state <= S_RESP;
            end
          end
        S_LPV_RD:
          if (arr_fire) begin
            state     <= S_WAIT_RD;
            ret_state <= S_LPV_WB;
          end
        S_LPV_WB:
          if (copy_hit_q ? arr_fire : mem_fire)
            state <= after_retire(hp_hit_q,
                                  valid_q[victim_q] && (dirty_q[victim_q] ||
                                  (copy_hit_q && copy_way_q == victim_q)));
        S_HPV_RD:
          if (arr_fire) begin
            state     <= S_WAIT_RD;
            ret_state <= S_HPV_WB;
          end
        S_HPV_WB:   if (mem_fire) state <= S_MEM_RD;
        S_MEM_RD:   if (mem_fire) state <= S_MEM_WAIT;
        S_MEM_WAIT: if (mem_rsp_valid_i) state <= S_FILL_HP;
        S_HP_RD:
          if (arr_fire) begin
            state     <= S_WAIT_RD;
            ret_state <= S_FILL_LP;
          end
        S_FILL_HP:  if (arr_fire) state <= place_q ? S_FILL_LP : S_RESP;
        S_FILL_LP:  if (arr_fire) state <= S_RESP;
        S_WAIT_RD:  if (arr_rsp_valid_i) state <= ret_state;
        S_RESP:     state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      op_we    <= req_we_i;
      op_tag   <= req_addr_i[OFF_W + SET_W +: TAG_W];
      op_set   <= req_addr_i[OFF_W +: SET_W];
      op_wdata <= req_wdata_i;
      op_wmask <= req_wmask_i;
    end
    if (state == S_LOOKUP) begin
      tags_q     <= rd_tag;
      valid_q    <= rd_valid;
      dirty_q    <= rd_dirty;
      lp_hit_q   <= lk_lp_hit;
      hp_hit_q   <= lk_hp_hit;
      hit_way_q  <= lk_hit_way;
      copy_hit_q <= lk_copy_hit;
      copy_way_q <= lk_copy_way;
      victim_q   <= lk_victim;
      place_q    <= (mode_o == MODE_PLACEMENT);
    end else if (tag_wr_en) begin
      tags_q[tag_wr_way]  <= tag_wr_tag;
      valid_q[tag_wr_way] <= tag_wr_valid;
      dirty_q[tag_wr_way] <= tag_wr_dirty;
    end
    if (state == S_WAIT_RD && arr_rsp_valid_i) line_q <= arr_rsp_rdata_i;
    if (state == S_MEM_WAIT && mem_rsp_valid_i) line_q <= mem_rsp_rdata_i;
    if (state == S_FILL_HP && arr_fire) line_q <= fill_line;
  end

  // A block is held by at most one high-power way
  assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOOKUP |-> $countones(hp_match(rd_tag, rd_valid, op_tag)) <= 1)
    else $error("block present in two high-power ways");

endmodule
