// tb_amber_rfu_capacity: configuration-memory capacity run of the RFU.
//
// Loads 117 custom instructions, the CI count of an AES (rijndael) kernel,
// each with its own P1..P4 entries, i.e. with no sharing of configuration
// parts, into the top at its default sizes. It then issues every CI twice,
// in two different orders, with random operands and compares all outputs
// with the reference model. Since no parts are shared, every CI is a full
// reconfiguration (3-cycle latency) unless it repeats the previous CI.
module tb_amber_rfu_capacity;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  localparam int NCI = 117;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  tbl_e cfg_tbl;
  logic [6:0] cfg_waddr;
  logic [CFG_W-1:0] cfg_wdata;
  logic ci_valid, ci_ready, res_valid;
  logic [6:0] ci_id;
  logic [NUM_IN-1:0][31:0]  ci_in;
  logic [NUM_OUT-1:0][31:0] res_data;
  logic [NUM_OUT-1:0]       res_en;
  logic [31:0] ci_count, ctx_switches;
  logic [NUM_PARTS-1:0][31:0] part_loads;

  amber_rfu dut (
    .clk, .rst_n, .cfg_we, .cfg_tbl, .cfg_waddr, .cfg_wdata,
    .ci_valid, .ci_ready, .ci_id, .ci_in,
    .res_valid, .res_data, .res_en, .ci_count, .ctx_switches, .part_loads);

  always #5 clk = ~clk;

  p1_t t1 [NCI];
  p2_t t2 [NCI];
  p3_t t3 [NCI];
  p4_t t4 [NCI];
  int checks = 0, failures = 0;
  int last = -1;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(tbl_e t, int a, logic [CFG_W-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_tbl = t; cfg_waddr = 7'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic run_ci(int id);
    w_t rin [8];
    w_t rout [6];
    int lat;
    for (int k = 0; k < 8; k++) begin ci_in[k] = rand_word(); rin[k] = ci_in[k]; end
    ci_valid = 1; ci_id = 7'(id);
    while (!ci_ready) @(negedge clk);
    @(posedge clk);
    #1 ci_valid = 0;
    lat = 0;
    while (!res_valid) begin @(posedge clk); #1; lat++; end
    chk($sformatf("CI %0d latency", id), lat, (id == last) ? 2 : 3);
    ref_array(t1[id], t2[id], t3[id], t4[id], rin, rout);
    for (int o = 0; o < 6; o++) chk($sformatf("CI %0d out %0d", id, o), res_data[o], rout[o]);
    last = id;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_tbl = TBL_CI; cfg_waddr = 0; cfg_wdata = '0;
    ci_valid = 0; ci_id = 0; ci_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCI; c++) begin
      t1[c] = rand_p1(); t2[c] = rand_p2(); t3[c] = rand_p3(); t4[c] = rand_p4();
      wr(TBL_P1, c, CFG_W'(t1[c])); wr(TBL_P2, c, CFG_W'(t2[c]));
      wr(TBL_P3, c, CFG_W'(t3[c])); wr(TBL_P4, c, CFG_W'(t4[c]));
      wr(TBL_CI, c, CFG_W'({7'(c), 7'(c), 7'(c), 7'(c)}));
    end
    for (int c = 0; c < NCI; c++) run_ci(c);
    for (int c = NCI - 1; c >= 0; c--) run_ci((c * 5) % NCI);
    run_ci(3);
    run_ci(3);
    chk("ci_count", ci_count, 32'(2 * NCI + 2));
    chk("every CI a context switch except the repeat", ctx_switches, 32'(2 * NCI + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
