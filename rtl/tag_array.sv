// tag_array: tags, valid and dirty bits of all ways of every set of the bank.
//
// The tag array is left as in a conventional cache: a lookup reads the tags of
// all 16 ways of one set in parallel, and the controller compares them. The
// read is synchronous: rd_set_i presented with rd_en_i in one cycle gives
// rd_tag_o, rd_valid_o and rd_dirty_o in the next, held until the next read.
// One way of one set is written per cycle (tag, valid and dirty together).
// All three are RAMs. After reset the valid bits are cleared one set per cycle
// (NSETS cycles); init_done_o rises when the sweep is over, and no lookup or
// write may be made before. Tags and dirty bits need no clearing because they
// are only used where the valid bit is set. A same-cycle read and write of one
// set returns the old contents.
module tag_array
  import nupa_pkg::*;
#(
  parameter int unsigned NSETS = SETS,
  parameter int unsigned NWAYS = WAYS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // lookup
  input  logic                          rd_en_i,
  input  logic [$clog2(NSETS)-1:0]      rd_set_i,
  output tag_t [NWAYS-1:0]              rd_tag_o,
  output logic [NWAYS-1:0]              rd_valid_o,
  output logic [NWAYS-1:0]              rd_dirty_o,
  output logic                          init_done_o,
  // update of one way
  input  logic                          wr_en_i,
  input  logic [$clog2(NSETS)-1:0]      wr_set_i,
  input  logic [$clog2(NWAYS)-1:0]      wr_way_i,
  input  tag_t                          wr_tag_i,
  input  logic                          wr_valid_i,
  input  logic                          wr_dirty_i
);

  localparam int unsigned SW = $clog2(NSETS);

  tag_t [NWAYS-1:0] tag_mem   [NSETS];
  logic [NWAYS-1:0] dirty_mem [NSETS];
  logic [NWAYS-1:0] valid_mem [NSETS];
  logic [SW-1:0]    init_set;

  // reset sweep
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_set    <= '0;
      init_done_o <= 1'b0;
    end else if (!init_done_o) begin
      init_set <= init_set + SW'(1);
      if (init_set == SW'(NSETS - 1)) init_done_o <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en_i) begin
      tag_mem[wr_set_i][wr_way_i]   <= wr_tag_i;
      dirty_mem[wr_set_i][wr_way_i] <= wr_dirty_i;
    end
    if (!init_done_o)
      valid_mem[init_set] <= '0;
    else if (wr_en_i)
      valid_mem[wr_set_i][wr_way_i] <= wr_valid_i;
    if (rd_en_i) begin
      rd_tag_o   <= tag_mem[rd_set_i];
      rd_dirty_o <= dirty_mem[rd_set_i];
      rd_valid_o <= valid_mem[rd_set_i];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !init_done_o |-> !rd_en_i && !wr_en_i)
    else $error("tag array used during its reset sweep");

endmodule
