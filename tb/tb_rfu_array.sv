// tb_rfu_array: self-checking test of the heterogeneous RFU datapath.
//
// Directed custom instructions with hand-computed results exercise the
// row-to-row paths, the long input lines to rows 2 and 3, the row-1 to
// row-3 link, the three neighbour links, tree and chain tri-FUs, output
// enables and a MOV used to pass a value through a row. The first directed
// CI is the clustering example of the architecture description:
//   ((LUI i1 | ORI i2) & d0) | ((d1 & ANDI i3) << 4)
// mapped as tri1 chain (row 1), tri2 chain (row 2), uni3 OR (row 3).
// Random configurations are then compared with the reference model.
module tb_rfu_array;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  p1_t p1;
  p2_t p2;
  p3_t p3;
  p4_t p4;
  logic [NUM_IN-1:0][31:0]  din;
  logic [NUM_OUT-1:0][31:0] dout;
  int checks = 0, failures = 0;

  rfu_array #(.DATA_W(32)) dut (.p1, .p2, .p3, .p4, .din, .dout);

  localparam node_fn_t F_MOV = '{op: OP_MOV, swap: 0, use_imm: 0, imm_sext: 0};

  function automatic node_fn_t f(op_e op, bit ui = 0, bit sw = 0);
    return '{op: op, swap: sw, use_imm: ui, imm_sext: 0};
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clear_cfg();
    p1 = '0; p2 = '0; p3 = '0; p4 = '0;
    for (int n = 0; n < NUM_NODES; n++) p1.fn[n] = F_MOV;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_t rin [8];
    w_t rout [6];
    for (int i = 0; i < 8; i++) din[i] = 32'h1111_1111 * (i + 1);

    // ---- CI 1: clustering example ------------------------------------------
    clear_cfg();
    p1.fn[N_TRI1+0] = f(OP_LUI, 1); p4.imm[N_TRI1+0] = 16'hA5C3;
    p1.fn[N_TRI1+1] = f(OP_OR, 1);  p4.imm[N_TRI1+1] = 16'h0F0F;
    p1.fn[N_TRI1+2] = f(OP_AND);
    p1.t1_mode = '{tree: 0, out_sel: 2'd2};
    p2.tri1_src[3] = 4'd0;                            // x2 = d0
    p2.l2_src[0] = 3'd1;                              // L2[0] carries d1
    p1.tri2_src[0] = 3'd3;                            // tri2.a0 = L2[0]
    p1.fn[N_TRI2+0] = f(OP_AND, 1); p4.imm[N_TRI2+0] = 16'h00FF;
    p1.fn[N_TRI2+1] = f(OP_SLL, 1); p4.imm[N_TRI2+1] = 16'd4;
    p1.t2_mode = '{tree: 0, out_sel: 2'd1};
    p1.link_sel = 2'd2;                               // row-1 link carries tri1
    p1.uni3_src[0] = 3'd7; p1.uni3_src[1] = 3'd0;     // OR(link, tri2)
    p1.fn[N_UNI3] = f(OP_OR);
    p3.en = 6'b000001; p3.sel[0] = 3'(F_UNI3);
    din[0] = 32'hFFFF_00FF; din[1] = 32'h0000_0A5B;
    #1;
    chk("CI1 clustering example", dout[0],
        ((32'hA5C3_0000 | 32'h0000_0F0F) & 32'hFFFF_00FF) | ((32'h0000_0A5B & 32'hFF) << 4));
    for (int o = 1; o < 6; o++) chk($sformatf("CI1 disabled output %0d", o), dout[o], 32'h0);

    // ---- CI 2: neighbour links, long row-3 lines, tree, MOV pass-through ---
    clear_cfg();
    din = '0;
    din[2] = 32'd1000; din[3] = 32'd24; din[4] = 32'd3; din[5] = 32'd77; din[6] = 32'd7;
    din[7] = 32'hF0;
    // uni1 = d2 + d3 ; uni2 = uni1 << d4 (neighbour uni1 -> uni2)
    p1.fn[N_UNI1] = f(OP_ADD); p2.uni1_src[0] = 4'd2; p2.uni1_src[1] = 4'd3;
    p1.fn[N_UNI2] = f(OP_SLL); p2.uni2_src[0] = 4'd8; p2.uni2_src[1] = 4'd4;
    // bi1 = (d5 - d6) + uni1 ; tri2 (tree) = (bi1 neighbour + uni2) ^ (L2[1]=d7 & 0xFF)
    p2.l2_src[0] = 3'd5; p2.l2_src[1] = 3'd6; p2.l2_src[2] = 3'd7;
    p1.fn[N_BI1+0] = f(OP_SUB); p1.fn[N_BI1+1] = f(OP_ADD); p1.bi1_out = 1'b1;
    p1.bi1_src[0] = 3'd3; p1.bi1_src[1] = 3'd4; p1.bi1_src[2] = 3'd0;
    p1.fn[N_TRI2+0] = f(OP_ADD); p1.tri2_src[0] = 3'd7; p1.tri2_src[1] = 3'd1;
    p1.fn[N_TRI2+1] = f(OP_AND, 1); p4.imm[N_TRI2+1] = 16'h00FF;
    p1.tri2_src[2] = 3'd5;
    p1.fn[N_TRI2+2] = f(OP_XOR);
    p1.t2_mode = '{tree: 1, out_sel: 2'd2};
    // row 3: tri3 chain = ((tri2 - L3[0]=d4) | L3[4]=d2) + 1 ; bi2 = MOV bi1 ; uni3 = L3[1]=d7 nor 0
    p2.l3_src[0] = 3'd4; p2.l3_src[4] = 3'd2; p2.l3_src[1] = 3'd7;
    p1.fn[N_TRI3+0] = f(OP_SUB); p1.tri3_src[0] = 3'd0; p1.tri3_src[1] = 3'd2;
    p1.fn[N_TRI3+1] = f(OP_OR);  p1.tri3_src[2] = 3'd6;
    p1.fn[N_TRI3+2] = f(OP_ADD, 1); p4.imm[N_TRI3+2] = 16'd1;
    p1.t3_mode = '{tree: 0, out_sel: 2'd2};
    p1.fn[N_BI2+0] = F_MOV; p1.bi2_src[0] = 3'd1; p1.bi2_out = 1'b0;
    p1.fn[N_UNI3] = f(OP_NOR, 1); p1.uni3_src[0] = 3'd3; p4.imm[N_UNI3] = 16'h0;
    p3.en = 6'b111111;
    p3.sel[0] = 3'(F_UNI1); p3.sel[1] = 3'(F_UNI2); p3.sel[2] = 3'(F_BI1);
    p3.sel[3] = 3'(F_TRI2); p3.sel[4] = 3'(F_TRI3); p3.sel[5] = 3'(F_BI2);
    #1;
    begin
      logic [31:0] u1, u2, b1, t2, t3;
      u1 = 32'd1024;
      u2 = 32'd8192;
      b1 = (32'd77 - 32'd7) + u1;
      t2 = (b1 + u2) ^ (32'hF0 & 32'hFF);
      t3 = ((t2 - 32'd3) | 32'd1000) + 32'd1;
      chk("CI2 uni1", dout[0], u1);
      chk("CI2 uni2 via neighbour", dout[1], u2);
      chk("CI2 bi1 chain", dout[2], b1);
      chk("CI2 tri2 tree via neighbour", dout[3], t2);
      chk("CI2 tri3 chain via long lines", dout[4], t3);
      chk("CI2 bi2 move", dout[5], b1);
      p3.sel[0] = 3'(F_UNI3); #1;
      chk("CI2 uni3 nor of long line", dout[0], ~32'hF0);
    end
    // reverse neighbour direction: uni1 = d2 + (uni2 = d3 << d4)
    p2.uni2_src[0] = 4'd3; p2.uni1_src[1] = 4'd8; p3.sel[0] = 3'(F_UNI1); #1;
    chk("CI2 uni2 -> uni1 neighbour", dout[0], 32'd1000 + (32'd24 << 3));
    // both directions selected: uni1 wins, uni2 sees 0 from its neighbour
    p2.uni2_src[0] = 4'd8; #1;
    chk("neighbour loop cut: uni2", dout[1], 32'd0);
    chk("neighbour loop cut: uni1", dout[0], 32'd1000);

    // ---- random configurations ---------------------------------------------
    for (int i = 0; i < 2000; i++) begin
      p1 = rand_p1(); p2 = rand_p2(); p3 = rand_p3(); p4 = rand_p4();
      for (int k = 0; k < 8; k++) begin din[k] = rand_word(); rin[k] = din[k]; end
      #1;
      ref_array(p1, p2, p3, p4, rin, rout);
      for (int o = 0; o < 6; o++) chk($sformatf("random %0d out %0d", i, o), dout[o], rout[o]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
