// fu_node: one instruction node of the RFU, and on its own a uni-instruction FU.
//
// The node executes one integer instruction on operands A and B. B may be
// replaced by the node's 16-bit immediate (zero- or sign-extended), and the
// two operands may then be exchanged, so that a value arriving on A can be
// used as either source of a non-commutative instruction (SUB, SLT, shifts).
//
// The node is heterogeneous: TYPES says which instruction types are built
// (bit 0 logical, bit 1 add/sub/compare, bit 2 shift). Opcodes of a type that
// is not built give zero, so the hardware for them is left out entirely.
// MOV (result = A) is always built; it is used to pass a value on to a later
// row. The per-FU type sets come from the source design; the opcode list,
// the immediate handling and the zero result for unbuilt types are this
// implementation's choices.
//
// Timing: purely combinational. Inside rfu_array two nodes feed each other
// through the row-1 neighbour links; lint tools report that structural loop
// through this module's operand logic (see rfu_array for how it is cut).
module fu_node
  import rfu_pkg::*;
#(
  parameter int         DATA_W = 32,
  parameter logic [2:0] TYPES  = 3'b111
) (
  input  node_fn_t          fn,
  input  logic [IMM_W-1:0]  imm,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  logic [DATA_W-1:0] imm_ext, b_eff, opa, opb;
  logic [4:0]        shamt;

  always_comb begin
    imm_ext = fn.imm_sext ? DATA_W'($signed(imm)) : DATA_W'(imm);
    b_eff   = fn.use_imm ? imm_ext : b;
    opa     = fn.swap ? b_eff : a;
    opb     = fn.swap ? a : b_eff;
    shamt   = opb[4:0];
  end

  always_comb begin
    y = '0;
    if (fn.op == OP_MOV) begin
      y = opa;
    end else if ((op_type(fn.op) & TYPES) != 3'b000) begin
      unique case (fn.op)
        OP_AND:  y = opa & opb;
        OP_OR:   y = opa | opb;
        OP_XOR:  y = opa ^ opb;
        OP_NOR:  y = ~(opa | opb);
        OP_ADD:  y = opa + opb;
        OP_SUB:  y = opa - opb;
        OP_SLT:  y = DATA_W'($signed(opa) < $signed(opb));
        OP_SLTU: y = DATA_W'(opa < opb);
        OP_SLL:  y = opa << shamt;
        OP_SRL:  y = opa >> shamt;
        OP_SRA:  y = DATA_W'($signed(opa) >>> shamt);
        OP_LUI:  y = opb << 16;
        default: y = '0;
      endcase
    end
  end

endmodule
