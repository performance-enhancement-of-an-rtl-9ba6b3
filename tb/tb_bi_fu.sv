// tb_bi_fu: self-checking test of the bi-instruction FU.
//
// Directed two-instruction chains with hand-computed results, delivery of
// either node, the type restriction of an arith-only unit, and random
// vectors against the reference model.
module tb_bi_fu;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  node_fn_t [1:0]        fn;
  logic [1:0][15:0]      imm;
  logic                  out_sel;
  logic [31:0]           a0, b0, b1, y_all, y_ar;
  int checks = 0, failures = 0;

  bi_fu #(.DATA_W(32), .TYPES(3'b111)) dut_all (.fn, .imm, .out_sel, .a0, .b0, .b1, .y(y_all));
  bi_fu #(.DATA_W(32), .TYPES(3'b010)) dut_ar  (.fn, .imm, .out_sel, .a0, .b0, .b1, .y(y_ar));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (a0 & 0x00FF) << 4   -- ANDi then SLL by immediate
    fn[0] = '{op: OP_AND, swap: 0, use_imm: 1, imm_sext: 0}; imm[0] = 16'h00FF;
    fn[1] = '{op: OP_SLL, swap: 0, use_imm: 1, imm_sext: 0}; imm[1] = 16'd4;
    a0 = 32'h1234_56AB; b0 = 0; b1 = 0; out_sel = 1; #1;
    chk("andi-sll chain", y_all, 32'h0000_0AB0);
    out_sel = 0; #1;
    chk("andi alone", y_all, 32'h0000_00AB);
    // b1 - (a0 + b0) using swap on node 1
    fn[0] = '{op: OP_ADD, swap: 0, use_imm: 0, imm_sext: 0};
    fn[1] = '{op: OP_SUB, swap: 1, use_imm: 0, imm_sext: 0};
    a0 = 32'd10; b0 = 32'd20; b1 = 32'd100; out_sel = 1; #1;
    chk("add-sub swapped", y_all, 32'd70);
    chk("add-sub swapped, arith-only unit", y_ar, 32'd70);
    // (a0 < b0) signed, then add b1 -- type 2 only
    fn[0] = '{op: OP_SLT, swap: 0, use_imm: 0, imm_sext: 0};
    fn[1] = '{op: OP_ADD, swap: 0, use_imm: 0, imm_sext: 0};
    a0 = 32'hFFFF_FFF0; b0 = 32'd3; b1 = 32'd41; #1;
    chk("slt-add", y_all, 32'd42);
    chk("slt-add, arith-only unit", y_ar, 32'd42);
    // a logic op on the arith-only unit gives 0, then add
    fn[0] = '{op: OP_OR, swap: 0, use_imm: 0, imm_sext: 0};
    a0 = 32'h10; b0 = 32'h01; b1 = 32'd5; #1;
    chk("or-add", y_all, 32'h16);
    chk("or-add, arith-only unit", y_ar, 32'd5);
    for (int i = 0; i < 3000; i++) begin
      fn[0] = rand_fn(); fn[1] = rand_fn(); imm = 32'($urandom);
      out_sel = 1'($urandom); a0 = rand_word(); b0 = rand_word(); b1 = rand_word();
      #1;
      chk($sformatf("random %0d", i), y_all,
          ref_bi(fn[0], fn[1], imm[0], imm[1], out_sel, a0, b0, b1, 3'b111));
      chk($sformatf("random %0d arith", i), y_ar,
          ref_bi(fn[0], fn[1], imm[0], imm[1], out_sel, a0, b0, b1, 3'b010));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
