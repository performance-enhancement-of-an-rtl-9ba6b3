// tb_fu_node: self-checking test of one RFU instruction node.
//
// Two nodes are tested side by side: one with all three instruction types
// built and one with only add/sub/compare (as the row-2 bi-FU). Directed
// vectors with hand-computed results cover every opcode, immediate zero- and
// sign-extension and operand swap; random vectors are compared with the
// reference model. Opcodes of an unbuilt type must give zero.
module tb_fu_node;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  node_fn_t    fn;
  logic [15:0] imm;
  logic [31:0] a, b, y_all, y_ar;
  int checks = 0, failures = 0;

  fu_node #(.DATA_W(32), .TYPES(3'b111)) dut_all (.fn, .imm, .a, .b, .y(y_all));
  fu_node #(.DATA_W(32), .TYPES(3'b010)) dut_ar  (.fn, .imm, .a, .b, .y(y_ar));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic vec(op_e op, bit sw, bit ui, bit sx, logic [15:0] im,
                     logic [31:0] va, logic [31:0] vb, logic [31:0] exp, string what);
    fn = '{op: op, swap: sw, use_imm: ui, imm_sext: sx};
    imm = im; a = va; b = vb;
    #1;
    chk(what, y_all, exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed vectors, expected values worked out by hand
    vec(OP_MOV,  0,0,0, 16'h0, 32'h1234_5678, 32'h0,          32'h1234_5678, "mov");
    vec(OP_AND,  0,0,0, 16'h0, 32'hF0F0_FFFF, 32'h0FF0_1234,  32'h00F0_1234, "and");
    vec(OP_OR,   0,0,0, 16'h0, 32'hF000_0001, 32'h0000_0100,  32'hF000_0101, "or");
    vec(OP_XOR,  0,0,0, 16'h0, 32'hFFFF_0000, 32'hFF00_FF00,  32'h00FF_FF00, "xor");
    vec(OP_NOR,  0,0,0, 16'h0, 32'hFFFF_0000, 32'h0000_00FF,  32'h0000_FF00, "nor");
    vec(OP_ADD,  0,0,0, 16'h0, 32'hFFFF_FFFF, 32'h0000_0002,  32'h0000_0001, "add wrap");
    vec(OP_SUB,  0,0,0, 16'h0, 32'd5,         32'd7,          32'hFFFF_FFFE, "sub");
    vec(OP_SUB,  1,0,0, 16'h0, 32'd5,         32'd7,          32'd2,         "sub swapped");
    vec(OP_SLT,  0,0,0, 16'h0, 32'hFFFF_FFFF, 32'd1,          32'd1,         "slt signed");
    vec(OP_SLTU, 0,0,0, 16'h0, 32'hFFFF_FFFF, 32'd1,          32'd0,         "sltu");
    vec(OP_SLL,  0,0,0, 16'h0, 32'h0000_0003, 32'd4,          32'h0000_0030, "sll");
    vec(OP_SRL,  0,0,0, 16'h0, 32'h8000_0000, 32'd31,         32'd1,         "srl");
    vec(OP_SRA,  0,0,0, 16'h0, 32'h8000_0000, 32'd4,          32'hF800_0000, "sra");
    vec(OP_SLL,  0,1,0, 16'd8, 32'h0000_00AB, 32'hFFFF,       32'h0000_AB00, "sll by immediate");
    vec(OP_LUI,  0,1,0, 16'hBEEF, 32'h0,      32'h0,          32'hBEEF_0000, "lui");
    vec(OP_AND,  0,1,0, 16'h8F0F, 32'hFFFF_FFFF, 32'h0,       32'h0000_8F0F, "andi zero-extended");
    vec(OP_ADD,  0,1,1, 16'hFFFF, 32'd10,     32'h0,          32'd9,         "addi sign-extended");
    vec(OP_ADD,  0,1,0, 16'hFFFF, 32'd10,     32'h0,          32'h0001_0009, "addi zero-extended");
    vec(OP_SUB,  1,1,1, 16'd100, 32'd30,      32'h0,          32'd70,        "immediate minus A");
    // heterogeneity: an arith-only node gives 0 for logic/shift, computes arith
    vec(OP_XOR,  0,0,0, 16'h0, 32'hFF, 32'h0F, 32'hF0, "xor on full node");
    chk("xor on arith-only node is 0", y_ar, 32'h0);
    vec(OP_SRL,  0,0,0, 16'h0, 32'h100, 32'd4, 32'h10, "srl on full node");
    chk("srl on arith-only node is 0", y_ar, 32'h0);
    vec(OP_ADD,  0,0,0, 16'h0, 32'd3, 32'd4, 32'd7, "add on full node");
    chk("add on arith-only node", y_ar, 32'd7);
    vec(OP_MOV,  0,0,0, 16'h0, 32'h55, 32'd4, 32'h55, "mov on full node");
    chk("mov on arith-only node", y_ar, 32'h55);
    // random against the reference model
    for (int i = 0; i < 3000; i++) begin
      fn = rand_fn(); imm = 16'($urandom); a = rand_word(); b = rand_word();
      #1;
      chk($sformatf("random %0d all", i), y_all, ref_node(fn, imm, a, b, 3'b111));
      chk($sformatf("random %0d arith", i), y_ar, ref_node(fn, imm, a, b, 3'b010));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
