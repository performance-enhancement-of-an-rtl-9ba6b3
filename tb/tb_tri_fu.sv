// tb_tri_fu: self-checking test of the tri-instruction FU.
//
// Covers the chain shape, the tree shape (two instructions feeding a
// third), delivery of one, two or three instructions, the logic/arith-only
// variant of row 3, and random vectors against the reference model.
module tb_tri_fu;
  import rfu_pkg::*;
  import rfu_ref_pkg::*;

  node_fn_t [2:0]        fn;
  logic [2:0][15:0]      imm;
  tri_mode_t             mode;
  logic [31:0]           a0, b0, x1, x2, y_all, y_la;
  int checks = 0, failures = 0;

  tri_fu #(.DATA_W(32), .TYPES(3'b111)) dut_all (.fn, .imm, .mode, .a0, .b0, .x1, .x2, .y(y_all));
  tri_fu #(.DATA_W(32), .TYPES(3'b011)) dut_la  (.fn, .imm, .mode, .a0, .b0, .x1, .x2, .y(y_la));

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
    // chain: LUI 0x1234 ; ORI 0x00F0 ; AND x2
    fn[0] = '{op: OP_LUI, swap: 0, use_imm: 1, imm_sext: 0}; imm[0] = 16'h1234;
    fn[1] = '{op: OP_OR,  swap: 0, use_imm: 1, imm_sext: 0}; imm[1] = 16'h00F0;
    fn[2] = '{op: OP_AND, swap: 0, use_imm: 0, imm_sext: 0}; imm[2] = 16'h0;
    a0 = 0; b0 = 0; x1 = 32'hDEAD; x2 = 32'h0FFF_0FFF;
    mode = '{tree: 0, out_sel: 2'd2}; #1;
    chk("lui-ori-and", y_all, 32'h0234_00F0);
    chk("lui-ori-and on logic/arith unit (lui unbuilt)", y_la, 32'h0000_00F0);
    mode.out_sel = 2'd1; #1;
    chk("lui-ori", y_all, 32'h1234_00F0);
    mode.out_sel = 2'd0; #1;
    chk("lui", y_all, 32'h1234_0000);
    mode.out_sel = 2'd3; #1;
    chk("out_sel 3 = n2", y_all, 32'h0234_00F0);
    // tree: (a0 + b0) ^ (x1 - x2)
    fn[0] = '{op: OP_ADD, swap: 0, use_imm: 0, imm_sext: 0};
    fn[1] = '{op: OP_SUB, swap: 0, use_imm: 0, imm_sext: 0};
    fn[2] = '{op: OP_XOR, swap: 0, use_imm: 0, imm_sext: 0};
    a0 = 32'd100; b0 = 32'd23; x1 = 32'd50; x2 = 32'd8;
    mode = '{tree: 1, out_sel: 2'd2}; #1;
    chk("tree add/sub/xor", y_all, 32'd123 ^ 32'd42);
    chk("tree add/sub/xor on logic/arith unit", y_la, 32'd123 ^ 32'd42);
    mode.out_sel = 2'd1; #1;
    chk("tree n1", y_all, 32'd42);
    // chain with the same functions: ((a0+b0) - x1) ^ x2
    mode = '{tree: 0, out_sel: 2'd2}; #1;
    chk("chain add/sub/xor", y_all, (32'd123 - 32'd50) ^ 32'd8);
    for (int i = 0; i < 3000; i++) begin
      for (int n = 0; n < 3; n++) fn[n] = rand_fn();
      imm = 48'({$urandom, $urandom}); mode = tri_mode_t'($urandom);
      a0 = rand_word(); b0 = rand_word(); x1 = rand_word(); x2 = rand_word();
      #1;
      chk($sformatf("random %0d", i), y_all,
          ref_tri(fn[0], fn[1], fn[2], imm[0], imm[1], imm[2], mode, a0, b0, x1, x2, 3'b111));
      chk($sformatf("random %0d logic/arith", i), y_la,
          ref_tri(fn[0], fn[1], fn[2], imm[0], imm[1], imm[2], mode, a0, b0, x1, x2, 3'b011));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
