// tb_amber_rfu: end-to-end test of the RFU with its configuration memory.
//
// Runs the top at its default sizes. It writes part tables and a CI table
// over the configuration port, where several CIs share parts:
//   CI 0  the clustering example ((LUI|ORI)&d0) | ((d1&ANDI)<<4)
//   CI 1  same structure (P1) as CI 0, other inputs and immediates
//   CI 2  neighbour links, tree and chain FUs, long lines, MOV
//   CI 3+ random combinations of random parts
// and then issues CIs through the valid/ready handshake. Every result is
// compared with the reference model evaluated on the testbench's own copy
// of the tables; the latency (2 cycles, 3 with a reload) and the set of
// reloaded parts are predicted independently. Each mechanism must occur at
// least once: full reconfiguration, partial reconfiguration, no
// reconfiguration, reload after a rewrite of an active part, a request
// waiting for a busy unit, the neighbour links, the row-1 to row-3 link,
// tree and chain tri-FUs and disabled outputs.
module tb_amber_rfu;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  localparam int NPART = 12;   // part-table entries used
  localparam int NCI   = 40;   // CI-table entries used
  localparam int IDX_W = 7;

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

  // testbench copies of the tables
  p1_t t1 [NPART];
  p2_t t2 [NPART];
  p3_t t3 [NPART];
  p4_t t4 [NPART];
  logic [NUM_PARTS-1:0][IDX_W-1:0] tci [NCI];
  // predicted active configuration
  logic [NUM_PARTS-1:0][IDX_W-1:0] act_idx;
  logic [NUM_PARTS-1:0]            act_v;

  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0, n_hit = 0, n_stale = 0, n_wait = 0;
  int n_nb = 0, n_link = 0, n_tree = 0, n_chain = 0, n_dis = 0;
  int exp_ctx = 0;
  int exp_loads [4] = '{0, 0, 0, 0};

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic node_fn_t f(op_e op, bit ui = 0, bit sw = 0);
    return '{op: op, swap: sw, use_imm: ui, imm_sext: 0};
  endfunction

  task automatic wr(tbl_e t, int a, logic [CFG_W-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_tbl = t; cfg_waddr = 7'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
    if (t != TBL_CI && act_idx[int'(t) - 1] == IDX_W'(a)) act_v[int'(t) - 1] = 1'b0;
  endtask

  task automatic build_tables();
    for (int i = 0; i < NPART; i++) begin
      t1[i] = rand_p1(); t2[i] = rand_p2(); t3[i] = rand_p3(); t4[i] = rand_p4();
    end
    // P1[0]: clustering example structure
    t1[0] = '0;
    for (int n = 0; n < NUM_NODES; n++) t1[0].fn[n] = f(OP_MOV);
    t1[0].fn[N_TRI1+0] = f(OP_LUI, 1);
    t1[0].fn[N_TRI1+1] = f(OP_OR, 1);
    t1[0].fn[N_TRI1+2] = f(OP_AND);
    t1[0].t1_mode = '{tree: 0, out_sel: 2'd2};
    t1[0].tri2_src[0] = 3'd3;
    t1[0].fn[N_TRI2+0] = f(OP_AND, 1);
    t1[0].fn[N_TRI2+1] = f(OP_SLL, 1);
    t1[0].t2_mode = '{tree: 0, out_sel: 2'd1};
    t1[0].link_sel = 2'd2;
    t1[0].uni3_src[0] = 3'd7; t1[0].uni3_src[1] = 3'd0;
    t1[0].fn[N_UNI3] = f(OP_OR);
    // P2[0]/P2[1]: its inputs (d0,d1) or (d3,d6)
    t2[0] = '0; t2[0].tri1_src[3] = 4'd0; t2[0].l2_src[0] = 3'd1;
    t2[1] = '0; t2[1].tri1_src[3] = 4'd3; t2[1].l2_src[0] = 3'd6;
    // P3[0]: output 0 only
    t3[0] = '0; t3[0].en = 6'b000001; t3[0].sel[0] = 3'(F_UNI3);
    // P4[0]/P4[1]: immediates
    t4[0] = '0; t4[0].imm[N_TRI1] = 16'hA5C3; t4[0].imm[N_TRI1+1] = 16'h0F0F;
    t4[0].imm[N_TRI2] = 16'h00FF; t4[0].imm[N_TRI2+1] = 16'd4;
    t4[1] = '0; t4[1].imm[N_TRI1] = 16'h1234; t4[1].imm[N_TRI1+1] = 16'h8001;
    t4[1].imm[N_TRI2] = 16'h0F0F; t4[1].imm[N_TRI2+1] = 16'd8;
    // P1[1]: neighbour links, tree and chain, long lines, MOV
    t1[1] = '0;
    for (int n = 0; n < NUM_NODES; n++) t1[1].fn[n] = f(OP_MOV);
    t1[1].fn[N_UNI1] = f(OP_ADD); t1[1].fn[N_UNI2] = f(OP_SLL);
    t1[1].fn[N_BI1+0] = f(OP_SUB); t1[1].fn[N_BI1+1] = f(OP_ADD); t1[1].bi1_out = 1'b1;
    t1[1].bi1_src[0] = 3'd3; t1[1].bi1_src[1] = 3'd4; t1[1].bi1_src[2] = 3'd0;
    t1[1].fn[N_TRI2+0] = f(OP_ADD); t1[1].tri2_src[0] = 3'd7; t1[1].tri2_src[1] = 3'd1;
    t1[1].fn[N_TRI2+1] = f(OP_AND, 1); t1[1].tri2_src[2] = 3'd5;
    t1[1].fn[N_TRI2+2] = f(OP_XOR);
    t1[1].t2_mode = '{tree: 1, out_sel: 2'd2};
    t1[1].fn[N_TRI3+0] = f(OP_SUB); t1[1].tri3_src[0] = 3'd0; t1[1].tri3_src[1] = 3'd2;
    t1[1].fn[N_TRI3+1] = f(OP_OR);  t1[1].tri3_src[2] = 3'd6;
    t1[1].fn[N_TRI3+2] = f(OP_ADD, 1);
    t1[1].t3_mode = '{tree: 0, out_sel: 2'd2};
    t1[1].bi2_src[0] = 3'd1;
    t2[2] = '0;
    t2[2].uni1_src[0] = 4'd2; t2[2].uni1_src[1] = 4'd3;
    t2[2].uni2_src[0] = 4'd8; t2[2].uni2_src[1] = 4'd4;
    t2[2].l2_src[0] = 3'd5; t2[2].l2_src[1] = 3'd6; t2[2].l2_src[2] = 3'd7;
    t2[2].l3_src[0] = 3'd4; t2[2].l3_src[4] = 3'd2;
    t3[1] = '0; t3[1].en = 6'b111111;
    t3[1].sel[0] = 3'(F_UNI1); t3[1].sel[1] = 3'(F_UNI2); t3[1].sel[2] = 3'(F_BI1);
    t3[1].sel[3] = 3'(F_TRI2); t3[1].sel[4] = 3'(F_TRI3); t3[1].sel[5] = 3'(F_BI2);
    t4[2] = '0; t4[2].imm[N_TRI2+1] = 16'h00FF; t4[2].imm[N_TRI3+2] = 16'd1;
    // CI table
    tci[0] = {7'd0, 7'd0, 7'd0, 7'd0};
    tci[1] = {7'd1, 7'd0, 7'd1, 7'd0};
    tci[2] = {7'd2, 7'd1, 7'd2, 7'd1};
    for (int c = 3; c < NCI; c++)
      for (int k = 0; k < 4; k++) tci[c][k] = 7'($urandom_range(0, NPART - 1));
  endtask

  // Issue one CI and check everything about it.
  task automatic run_ci(int id, bit hold_while_busy = 0);
    logic [NUM_PARTS-1:0] miss;
    w_t rin [8];
    w_t rout [6];
    int lat;
    p1_t c1; p2_t c2; p3_t c3; p4_t c4;
    for (int k = 0; k < 8; k++) begin ci_in[k] = rand_word(); rin[k] = ci_in[k]; end
    if (id == 2) begin
      ci_in[2] = 32'd1000; ci_in[3] = 32'd24; ci_in[4] = 32'd3; ci_in[5] = 32'd77;
      ci_in[6] = 32'd7; ci_in[7] = 32'hF0;
      for (int k = 0; k < 8; k++) rin[k] = ci_in[k];
    end
    ci_valid = 1; ci_id = 7'(id);
    if (!ci_ready) n_wait++;
    while (!ci_ready) @(negedge clk);
    // prediction of the reconfiguration
    for (int k = 0; k < 4; k++) miss[k] = !act_v[k] || act_idx[k] != tci[id][k];
    @(posedge clk);
    #1;
    if (!hold_while_busy) ci_valid = 0;
    else if (!ci_ready) n_wait++;     // next request is already waiting
    lat = 0;
    while (!res_valid) begin @(posedge clk); #1; lat++; end
    if (miss == 4'b1111) n_full++;
    else if (miss != 4'b0000) n_partial++;
    else n_hit++;
    if (miss != 0) exp_ctx++;
    for (int k = 0; k < 4; k++) if (miss[k]) begin
      exp_loads[k]++;
      act_idx[k] = tci[id][k];
      act_v[k] = 1'b1;
    end
    chk($sformatf("CI %0d latency", id), lat, (miss != 0) ? 3 : 2);
    c1 = t1[tci[id][0]]; c2 = t2[tci[id][1]]; c3 = t3[tci[id][2]]; c4 = t4[tci[id][3]];
    ref_array(c1, c2, c3, c4, rin, rout);
    for (int o = 0; o < 6; o++) chk($sformatf("CI %0d out %0d", id, o), res_data[o], rout[o]);
    chk($sformatf("CI %0d output enables", id), 32'(res_en), 32'(c3.en));
    if (c2.uni1_src[0] == 8 || c2.uni1_src[1] == 8 || c2.uni2_src[0] == 8 || c2.uni2_src[1] == 8 ||
        c1.tri2_src[0] == 7 || c1.tri2_src[1] == 7 || c1.tri2_src[2] == 7 || c1.tri2_src[3] == 7)
      n_nb++;
    if (c1.uni3_src[0] == 7 || c1.uni3_src[1] == 7 || c1.tri3_src[0] == 7 || c1.bi2_src[0] == 7)
      n_link++;
    if (c1.t1_mode.tree || c1.t2_mode.tree || c1.t3_mode.tree) n_tree++;
    if (!c1.t1_mode.tree || !c1.t2_mode.tree || !c1.t3_mode.tree) n_chain++;
    if (c3.en != 6'b111111) n_dis++;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act_v = '0; act_idx = '0;
    cfg_we = 0; cfg_tbl = TBL_CI; cfg_waddr = 0; cfg_wdata = '0;
    ci_valid = 0; ci_id = 0; ci_in = '0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NPART; i++) begin
      wr(TBL_P1, i, CFG_W'(t1[i])); wr(TBL_P2, i, CFG_W'(t2[i]));
      wr(TBL_P3, i, CFG_W'(t3[i])); wr(TBL_P4, i, CFG_W'(t4[i]));
    end
    for (int c = 0; c < NCI; c++) wr(TBL_CI, c, CFG_W'(tci[c]));

    // directed sequence
    ci_in = '0;
    run_ci(0);                       // full reconfiguration
    chk("clustering example", res_data[0],
        ((32'hA5C3_0000 | 32'h0000_0F0F) & ci_in[0]) | ((ci_in[1] & 32'hFF) << 4));
    run_ci(0);                       // no reconfiguration
    run_ci(1);                       // partial: P2, P4
    chk("similar CI sharing P1", res_data[0],
        ((32'h1234_0000 | 32'h0000_8001) & ci_in[3]) | ((ci_in[6] & 32'h0F0F) << 8));
    run_ci(2);                       // full
    chk("neighbour CI: uni2 = (d2+d3) << d4", res_data[1], 32'd8192);
    chk("neighbour CI: tri3", res_data[4], ((((32'd70 + 32'd1024 + 32'd8192) ^ 32'hF0) - 32'd3) | 32'd1000) + 32'd1);
    // rewrite the active P4 entry, then rerun: only P4 reloads
    t4[2].imm[N_TRI3+2] = 16'd5;
    wr(TBL_P4, 2, CFG_W'(t4[2]));
    n_stale++;
    run_ci(2);
    chk("after P4 rewrite", res_data[4], ((((32'd70 + 32'd1024 + 32'd8192) ^ 32'hF0) - 32'd3) | 32'd1000) + 32'd5);
    // back-to-back requests with valid held: the second waits for ready
    run_ci(0, 1);
    run_ci(0);
    // random CIs
    for (int i = 0; i < 400; i++) run_ci($urandom_range(0, NCI - 1));

    chk("ci_count", ci_count, 32'(407));
    chk("ctx_switches", ctx_switches, 32'(exp_ctx));
    for (int k = 0; k < 4; k++) chk($sformatf("part_loads[%0d]", k), part_loads[k], 32'(exp_loads[k]));
    $display("mechanisms: full=%0d partial=%0d none=%0d stale=%0d wait=%0d neighbour=%0d link=%0d tree=%0d chain=%0d disabled_out=%0d",
             n_full, n_partial, n_hit, n_stale, n_wait, n_nb, n_link, n_tree, n_chain, n_dis);
    if (n_full == 0)    begin failures++; $display("FAIL no full reconfiguration"); end
    if (n_partial == 0) begin failures++; $display("FAIL no partial reconfiguration"); end
    if (n_hit == 0)     begin failures++; $display("FAIL no CI without reconfiguration"); end
    if (n_stale == 0)   begin failures++; $display("FAIL no reload after rewrite"); end
    if (n_wait == 0)    begin failures++; $display("FAIL no request waited"); end
    if (n_nb == 0)      begin failures++; $display("FAIL neighbour links unused"); end
    if (n_link == 0)    begin failures++; $display("FAIL row-1 to row-3 link unused"); end
    if (n_tree == 0)    begin failures++; $display("FAIL tree mode unused"); end
    if (n_chain == 0)   begin failures++; $display("FAIL chain mode unused"); end
    if (n_dis == 0)     begin failures++; $display("FAIL no disabled output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
