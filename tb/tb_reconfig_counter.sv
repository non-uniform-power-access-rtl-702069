// tb_reconfig_counter: checks the placement-mode counter against a reference
// model: +2 on a hit, -1 on a miss, saturation at -15 and +15, switch to
// conventional mode below 0 and back to placement mode above 0. Drives random
// and directed event streams and compares count and mode every cycle.
module tb_reconfig_counter;
  import nupa_pkg::*;

  logic clk = 0, rst_n = 0, hit = 0, miss = 0;
  logic signed [4:0] ctr;
  mode_e mode;
  int checks = 0, failures = 0;
  int ref_ctr;
  mode_e ref_mode;
  int sat_hi = 0, sat_lo = 0, to_conv = 0, to_place = 0;

  reconfig_counter dut (.clk, .rst_n, .hit_i(hit), .miss_i(miss), .ctr_o(ctr), .mode_o(mode));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic h, input logic m);
    hit = h; miss = m;
    @(posedge clk);
    #1;
    if (h) ref_ctr = ref_ctr + 2; else if (m) ref_ctr = ref_ctr - 1;
    if (ref_ctr > 15) begin ref_ctr = 15; sat_hi++; end
    if (ref_ctr < -15) begin ref_ctr = -15; sat_lo++; end
    if (h || m) begin
      if (ref_mode == MODE_PLACEMENT && ref_ctr < 0) begin ref_mode = MODE_CONVENTIONAL; to_conv++; end
      else if (ref_mode == MODE_CONVENTIONAL && ref_ctr > 0) begin ref_mode = MODE_PLACEMENT; to_place++; end
    end
    checks++;
    if (int'(ctr) != ref_ctr || mode != ref_mode) begin
      failures++;
      $display("mismatch: ctr %0d (exp %0d) mode %s (exp %s)", ctr, ref_ctr, mode.name(), ref_mode.name());
    end
  endtask

  initial begin
    ref_ctr = 0; ref_mode = MODE_PLACEMENT;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    checks++;
    if (ctr != 0 || mode != MODE_PLACEMENT) failures++;
    // directed: climb to saturation, fall to the floor, climb back
    repeat (10) step(1, 0);
    checks++; if (ctr != 15) failures++;
    repeat (40) step(0, 1);
    checks++; if (ctr != -15 || mode != MODE_CONVENTIONAL) failures++;
    repeat (5) step(0, 0);
    repeat (8) step(1, 0);
    checks++; if (ctr != 1 || mode != MODE_PLACEMENT) failures++;
    // exactly at the threshold: no switch
    step(0, 1);
    checks++; if (ctr != 0 || mode != MODE_PLACEMENT) failures++;
    // random streams with varying hit rates
    for (int phase = 0; phase < 20; phase++) begin
      int rate = (phase % 4) * 25 + 5;
      for (int i = 0; i < 200; i++) begin
        logic h, m;
        h = ($urandom % 100) < rate;
        m = !h && ($urandom % 4 != 0);
        step(h, m);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || to_conv == 0 || to_place == 0) begin
      failures++;
      $display("a counter mechanism never happened");
    end
    $display("saturate-high %0d saturate-low %0d to-conventional %0d to-placement %0d",
             sat_hi, sat_lo, to_conv, to_place);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
