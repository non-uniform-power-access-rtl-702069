// tb_tag_array: checks the tag array against a reference copy: valid bits are
// clear after the 4096-cycle reset sweep, which must end on time, a lookup returns all 16 ways of a set one cycle after it is
// requested, and single-way writes of tag, valid and dirty land where they
// should. Random writes and lookups over the full 4096-set array.
module tb_tag_array;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, init_done;
  logic rd_en = 0, wr_en = 0, wr_valid, wr_dirty;
  set_t rd_set, wr_set;
  way_t wr_way;
  tag_t wr_tag;
  tag_t [WAYS-1:0] rd_tag;
  logic [WAYS-1:0] rd_valid, rd_dirty;
  int checks = 0, failures = 0;

  tag_t [WAYS-1:0] ref_tag   [SETS];
  logic [WAYS-1:0] ref_valid [SETS];
  logic [WAYS-1:0] ref_dirty [SETS];

  tag_array dut (.clk, .rst_n, .rd_en_i(rd_en), .rd_set_i(rd_set), .rd_tag_o(rd_tag),
                 .rd_valid_o(rd_valid), .rd_dirty_o(rd_dirty), .init_done_o(init_done), .wr_en_i(wr_en),
                 .wr_set_i(wr_set), .wr_way_i(wr_way), .wr_tag_i(wr_tag),
                 .wr_valid_i(wr_valid), .wr_dirty_i(wr_dirty));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input set_t s);
    rd_en = 1; rd_set = s;
    @(posedge clk); #1;
    rd_en = 0;
    checks++;
    if (rd_valid != ref_valid[s]) begin
      failures++;
      $display("set %0d valid %h expected %h", s, rd_valid, ref_valid[s]);
    end
    checks++;
    for (int w = 0; w < int'(WAYS); w++)
      if (ref_valid[s][w] && (rd_tag[w] != ref_tag[s][w] || rd_dirty[w] != ref_dirty[s][w])) begin
        failures++;
        $display("set %0d way %0d tag %h/%b expected %h/%b", s, w, rd_tag[w], rd_dirty[w],
                 ref_tag[s][w], ref_dirty[s][w]);
        break;
      end
  endtask

  initial begin
    for (int s = 0; s < int'(SETS); s++) ref_valid[s] = '0;
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
    for (int i = 0; i < 50; i++) lookup(set_t'($urandom));
    for (int i = 0; i < 3000; i++) begin
      set_t s;
      s = set_t'($urandom % 32);  // a few sets, so they fill up
      wr_en = 1; wr_set = s; wr_way = way_t'($urandom); wr_tag = tag_t'($urandom);
      wr_valid = ($urandom % 8) != 0; wr_dirty = $urandom;
      @(posedge clk); #1;
      wr_en = 0;
      ref_tag[s][wr_way] = wr_tag; ref_valid[s][wr_way] = wr_valid; ref_dirty[s][wr_way] = wr_dirty;
      if (i % 3 == 0) lookup(set_t'($urandom % 32));
    end
    for (int s = 0; s < 32; s++) lookup(set_t'(s));
    lookup(set_t'(SETS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
