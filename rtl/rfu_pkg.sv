// rfu_pkg: types and constants shared by the heterogeneous reconfigurable
// functional unit (RFU) and its configuration memory.
//
// The RFU is a three-row array of uni-, bi- and tri-instruction functional
// units with 8 data inputs and 6 data outputs. Every functional-unit node
// executes one integer instruction of a MIPS-like set. The instructions fall
// into three types: logical (type 1), add/sub/compare (type 2) and shift
// (type 3); a "move" (pass operand A) is available on every node so that
// values can be routed through a row.
//
// A custom-instruction (CI) configuration is split into four separately
// stored parts:
//   P1  functions of all nodes and the intermediate connections (the operand
//       selects of rows 2 and 3, the row-1 -> row-3 link),
//   P2  input selection (row-1 operand selects, long input lines),
//   P3  output selection,
//   P4  immediate values.
// The four-part split, the 8/6 input/output counts, the FU mix and the
// instruction types follow the source design. The exact bit layout of each
// part (and hence its width) is this implementation's own encoding.
package rfu_pkg;

  // ---- array shape ---------------------------------------------------------
  localparam int NUM_IN    = 8;   // RFU data inputs
  localparam int NUM_OUT   = 6;   // RFU data outputs
  localparam int NUM_NODES = 16;  // 3 uni + 2x2 bi + 3x3 tri instruction nodes
  localparam int NUM_FU    = 8;   // uni1 uni2 tri1 | tri2 bi1 | uni3 tri3 bi2
  localparam int NUM_L2    = 4;   // long input lines ending at row 2
  localparam int NUM_L3    = 5;   // long input lines ending at row 3
  localparam int IMM_W     = 16;  // immediate field of one node (MIPS I-type)

  // Node numbers inside the configuration.
  localparam int N_UNI1 = 0;
  localparam int N_UNI2 = 1;
  localparam int N_TRI1 = 2;   // 2,3,4
  localparam int N_TRI2 = 5;   // 5,6,7
  localparam int N_BI1  = 8;   // 8,9
  localparam int N_UNI3 = 10;
  localparam int N_TRI3 = 11;  // 11,12,13
  localparam int N_BI2  = 14;  // 14,15

  // FU numbers used by output selects and the row-1 -> row-3 link.
  localparam int F_UNI1 = 0, F_UNI2 = 1, F_TRI1 = 2, F_TRI2 = 3,
                 F_BI1  = 4, F_UNI3 = 5, F_TRI3 = 6, F_BI2  = 7;

  // ---- instruction types (bit i-1 = type i supported) ----------------------
  localparam logic [2:0] T_LOGIC = 3'b001;  // type 1
  localparam logic [2:0] T_ARITH = 3'b010;  // type 2
  localparam logic [2:0] T_SHIFT = 3'b100;  // type 3

  typedef enum logic [3:0] {
    OP_MOV  = 4'd0,   // result = A (route-through)
    OP_AND  = 4'd1,   // type 1
    OP_OR   = 4'd2,
    OP_XOR  = 4'd3,
    OP_NOR  = 4'd4,
    OP_ADD  = 4'd5,   // type 2
    OP_SUB  = 4'd6,
    OP_SLT  = 4'd7,
    OP_SLTU = 4'd8,
    OP_SLL  = 4'd9,   // type 3: A shifted by B[4:0]
    OP_SRL  = 4'd10,
    OP_SRA  = 4'd11,
    OP_LUI  = 4'd12   // type 3: B << 16
  } op_e;

  // Function of one node.
  typedef struct packed {
    op_e  op;
    logic swap;      // exchange A and B after immediate substitution
    logic use_imm;   // B := extended immediate
    logic imm_sext;  // 1: sign-extend immediate, 0: zero-extend
  } node_fn_t;

  // Tri-instruction FU mode: tree  n2 = f(n0, f(x1,x2))
  //                          chain n2 = f(f(n0,x1), x2)
  typedef struct packed {
    logic       tree;
    logic [1:0] out_sel;  // 0: n0, 1: n1, 2/3: n2
  } tri_mode_t;

  typedef logic [3:0] sel1_t;  // row-1 operand: 0-7 inputs, 8 neighbour, else 0
  typedef logic [2:0] sel3_t;  // row-2/3 operand and input-line selects

  // P1: functions and intermediate connections.
  typedef struct packed {
    node_fn_t [NUM_NODES-1:0] fn;
    tri_mode_t                t1_mode, t2_mode, t3_mode;
    logic                     bi1_out, bi2_out;   // 0: node 0, 1: node 1
    logic [1:0]               link_sel;           // row-1 FU driving the row-3 link
    sel3_t [3:0]              tri2_src;           // row-2 sources: 0 uni1, 1 uni2,
    sel3_t [2:0]              bi1_src;            // 2 tri1, 3-6 L2[0..3], 7 neighbour
    sel3_t [1:0]              uni3_src;           // row-3 sources: 0 tri2, 1 bi1,
    sel3_t [3:0]              tri3_src;           // 2-6 L3[0..4], 7 row-1 link
    sel3_t [2:0]              bi2_src;
  } p1_t;

  // P2: input selection.
  typedef struct packed {
    sel1_t [1:0]        uni1_src;
    sel1_t [1:0]        uni2_src;
    sel1_t [3:0]        tri1_src;
    sel3_t [NUM_L2-1:0] l2_src;    // RFU input carried by each long line
    sel3_t [NUM_L3-1:0] l3_src;
  } p2_t;

  // P3: output selection.
  typedef struct packed {
    logic  [NUM_OUT-1:0]       en;
    sel3_t [NUM_OUT-1:0]       sel;   // FU number (F_*)
  } p3_t;

  // P4: immediate values, one per node.
  typedef struct packed {
    logic [NUM_NODES-1:0][IMM_W-1:0] imm;
  } p4_t;

  localparam int P1_W = $bits(p1_t);
  localparam int P2_W = $bits(p2_t);
  localparam int P3_W = $bits(p3_t);
  localparam int P4_W = $bits(p4_t);
  localparam int CFG_W = (P1_W > P2_W ? (P1_W > P3_W ? (P1_W > P4_W ? P1_W : P4_W)
                                                    : (P3_W > P4_W ? P3_W : P4_W))
                                      : (P2_W > P3_W ? (P2_W > P4_W ? P2_W : P4_W)
                                                    : (P3_W > P4_W ? P3_W : P4_W)));
  localparam int NUM_PARTS = 4;

  // Configuration-memory tables, selected on the write port.
  typedef enum logic [2:0] {
    TBL_CI = 3'd0, TBL_P1 = 3'd1, TBL_P2 = 3'd2, TBL_P3 = 3'd3, TBL_P4 = 3'd4
  } tbl_e;

  // Which instruction type an opcode belongs to (MOV belongs to none: always built).
  function automatic logic [2:0] op_type(op_e op);
    unique case (op)
      OP_AND, OP_OR, OP_XOR, OP_NOR:     return T_LOGIC;
      OP_ADD, OP_SUB, OP_SLT, OP_SLTU:   return T_ARITH;
      OP_SLL, OP_SRL, OP_SRA, OP_LUI:    return T_SHIFT;
      default:                           return 3'b000;
    endcase
  endfunction

endpackage
