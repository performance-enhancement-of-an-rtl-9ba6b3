// tb_rfu_ctrl: self-checking test of the partial-reconfiguration controller.
//
// A small table model in the testbench answers CI-table reads one cycle
// later, like the configuration memory. The test issues a sequence of CIs
// that share some configuration parts and checks, for each: which parts are
// loaded (all, some or none), the latency from the accepting edge to
// exec_en (1 cycle without and 2 with a reload), that a write into a loaded
// part entry forces that part to be reloaded, that a request waiting while
// the unit is busy is accepted afterwards, and the statistics counters.
module tb_rfu_ctrl;
  import rfu_pkg::*;

  localparam int CI_DEPTH = 8;
  localparam int P_DEPTH  = 8;
  localparam int IDX_W    = 3;

  logic clk = 0, rst_n = 0;
  logic ci_valid, ci_ready;
  logic [2:0] ci_id;
  logic cfg_we;
  tbl_e cfg_tbl;
  logic [2:0] cfg_waddr;
  logic ci_re;
  logic [2:0] ci_raddr;
  logic [NUM_PARTS-1:0][IDX_W-1:0] ci_idx;
  logic [NUM_PARTS-1:0] p_re, load_en;
  logic [NUM_PARTS-1:0][IDX_W-1:0] p_raddr;
  logic exec_en;
  logic [31:0] ci_count, ctx_switches;
  logic [NUM_PARTS-1:0][31:0] part_loads;
  int checks = 0, failures = 0;

  logic [NUM_PARTS-1:0][IDX_W-1:0] ci_tab [CI_DEPTH];

  rfu_ctrl #(.CI_DEPTH(CI_DEPTH), .P_DEPTH(P_DEPTH)) dut (
    .clk, .rst_n, .ci_valid, .ci_ready, .ci_id, .cfg_we, .cfg_tbl, .cfg_waddr,
    .ci_re, .ci_raddr, .ci_idx, .p_re, .p_raddr, .load_en, .exec_en,
    .ci_count, .ctx_switches, .part_loads);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ci_re) ci_idx <= ci_tab[ci_raddr];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Issue one CI, wait for exec_en, return the loaded-part mask and latency.
  task automatic issue(input logic [2:0] id, output logic [3:0] loaded, output int lat);
    loaded = '0;
    lat = 0;
    @(negedge clk);
    ci_valid = 1; ci_id = id;
    while (!ci_ready) @(negedge clk);
    @(posedge clk);            // accepting edge
    #1 ci_valid = 0;
    do begin
      @(posedge clk);
      lat++;
      loaded |= load_en;
      #1;
    end while (!exec_en);
    @(posedge clk);            // leave EXEC
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ld;
    int lat;
    // part index order in an entry: [0]=P1 [1]=P2 [2]=P3 [3]=P4
    ci_tab[0] = {3'd0, 3'd0, 3'd0, 3'd0};
    ci_tab[1] = {3'd1, 3'd0, 3'd1, 3'd0};   // shares P1 and P3 with CI 0
    ci_tab[2] = {3'd2, 3'd2, 3'd2, 3'd1};   // shares nothing
    for (int i = 3; i < CI_DEPTH; i++) ci_tab[i] = '0;
    ci_valid = 0; ci_id = 0; cfg_we = 0; cfg_tbl = TBL_CI; cfg_waddr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("ready after reset", ci_ready, 1);

    issue(3'd0, ld, lat);
    chk("CI0 first: all parts loaded", ld, 4'b1111); chk("CI0 first: latency", lat, 2);
    issue(3'd0, ld, lat);
    chk("CI0 again: nothing loaded", ld, 4'b0000); chk("CI0 again: latency", lat, 1);
    issue(3'd1, ld, lat);
    chk("CI1: P2 and P4 loaded", ld, 4'b1010); chk("CI1: latency", lat, 2);
    issue(3'd0, ld, lat);
    chk("CI0 after CI1: P2 and P4 loaded", ld, 4'b1010);
    // overwrite the loaded P1 entry: P1 becomes stale
    @(negedge clk);
    cfg_we = 1; cfg_tbl = TBL_P1; cfg_waddr = 3'd0;
    @(negedge clk);
    cfg_we = 0;
    issue(3'd0, ld, lat);
    chk("CI0 after P1 rewrite: P1 reloaded", ld, 4'b0001);
    // writing an entry that is not loaded changes nothing
    @(negedge clk);
    cfg_we = 1; cfg_tbl = TBL_P3; cfg_waddr = 3'd5;
    @(negedge clk);
    cfg_we = 0;
    issue(3'd0, ld, lat);
    chk("CI0 after unrelated write: nothing loaded", ld, 4'b0000);
    issue(3'd2, ld, lat);
    chk("CI2: all parts loaded", ld, 4'b1111);
    // request held while busy: issue CI1 and immediately request CI1 again
    @(negedge clk);
    ci_valid = 1; ci_id = 3'd1;
    @(posedge clk); #1;
    chk("busy after accept", ci_ready, 0);
    lat = 0;
    while (!ci_ready) begin @(posedge clk); #1; lat++; end
    chk("second request waited for the first CI", lat, 3);
    @(posedge clk); #1 ci_valid = 0;      // second CI1 accepted here
    while (!exec_en) @(posedge clk);
    @(posedge clk); #1;

    chk("ci_count", ci_count, 9);
    chk("ctx_switches", ctx_switches, 6);
    chk("P1 loads", part_loads[0], 4);
    chk("P2 loads", part_loads[1], 5);
    chk("P3 loads", part_loads[2], 3);
    chk("P4 loads", part_loads[3], 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
