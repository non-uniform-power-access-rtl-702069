// reconfig_counter: the single global saturating counter that turns the
// smart-placement (copy-on-touch) scheme of the bank on and off.
//
// Every lookup of the bank reports one event. In placement mode a hit in the
// low-power way adds INC and any other outcome subtracts DEC; in conventional
// mode a hit on the set's most recently used block adds INC and anything else
// subtracts DEC. The count saturates at CTR_MIN and CTR_MAX. When the count falls
// below THRESH the bank goes to conventional mode; when it rises above THRESH it
// goes back to placement mode. A 5-bit counter from -15 to +15, steps of +2 and
// -1 and a threshold of 0 are the published values. The reset state (count 0,
// placement mode) is this design's choice. With DYN_RECONFIG = 0 the counter
// still counts but the mode stays in placement mode: the published comparison
// of smart placement with and without dynamic reconfiguration.
//
// Interface: hit_i and miss_i are one-cycle pulses (at most one at a time).
// ctr_o and mode_o are registered: the mode seen by a lookup is the one that
// resulted from all earlier lookups.
module reconfig_counter
  import nupa_pkg::*;
#(
  parameter int CTR_W  = 5,
  parameter int CTR_MAX = 15,
  parameter int CTR_MIN = -15,
  parameter int INC     = 2,
  parameter int DEC     = 1,
  parameter int THRESH  = 0,
  parameter bit DYN_RECONFIG = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    hit_i,
  input  logic                    miss_i,
  output logic signed [CTR_W-1:0] ctr_o,
  output mode_e                   mode_o
);

  logic signed [CTR_W+1:0] sum;
  logic signed [CTR_W-1:0] ctr_next;

  always_comb begin
    sum = (CTR_W+2)'(ctr_o);
    if (hit_i)       sum = sum + (CTR_W+2)'(INC);
    else if (miss_i) sum = sum - (CTR_W+2)'(DEC);
    if (sum > (CTR_W+2)'(CTR_MAX))      ctr_next = CTR_W'(CTR_MAX);
    else if (sum < (CTR_W+2)'(CTR_MIN)) ctr_next = CTR_W'(CTR_MIN);
    else                                ctr_next = sum[CTR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctr_o  <= '0;
      mode_o <= MODE_PLACEMENT;
    end else if (hit_i || miss_i) begin
      ctr_o <= ctr_next;
      if (!DYN_RECONFIG)
        mode_o <= MODE_PLACEMENT;
      else if (mode_o == MODE_PLACEMENT && ctr_next < CTR_W'(THRESH))
        mode_o <= MODE_CONVENTIONAL;
      else if (mode_o == MODE_CONVENTIONAL && ctr_next > CTR_W'(THRESH))
        mode_o <= MODE_PLACEMENT;
    end
  end

  initial begin
    assert (CTR_MAX < (1 <<< (CTR_W - 1)) && CTR_MIN >= -(1 <<< (CTR_W - 1)))
      else $error("counter range does not fit CTR_W bits");
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hit_i && miss_i))
    else $error("hit and miss in the same cycle");

endmodule
