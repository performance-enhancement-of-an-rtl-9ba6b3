// bi_fu: bi-instruction functional unit.
//
// Two fu_node instances wired as a fixed chain, so the unit executes any
// two-instruction sub-graph in which the first result feeds only the second:
//   n0 = f0(a0, b0)      n1 = f1(n0, b1)
// out_sel chooses whether the unit delivers n0 (one instruction mapped) or
// n1 (two instructions mapped). Chaining inside the unit replaces an operand
// multiplexer between two separate FUs, which is what shortens the critical
// path. Node 1 can use n0 as either operand through its swap bit.
//
// The chain structure and the per-FU instruction types (TYPES, applied to
// both nodes) follow the source design; the operand/immediate handling is
// that of fu_node. Timing: purely combinational.
module bi_fu
  import rfu_pkg::*;
#(
  parameter int         DATA_W = 32,
  parameter logic [2:0] TYPES  = 3'b111
) (
  input  node_fn_t [1:0]           fn,
  input  logic [1:0][IMM_W-1:0]    imm,
  input  logic                     out_sel,
  input  logic [DATA_W-1:0]        a0,
  input  logic [DATA_W-1:0]        b0,
  input  logic [DATA_W-1:0]        b1,
  output logic [DATA_W-1:0]        y
);

  logic [DATA_W-1:0] n0, n1;

  fu_node #(.DATA_W(DATA_W), .TYPES(TYPES)) u_n0 (.fn(fn[0]), .imm(imm[0]), .a(a0), .b(b0), .y(n0));
  fu_node #(.DATA_W(DATA_W), .TYPES(TYPES)) u_n1 (.fn(fn[1]), .imm(imm[1]), .a(n0), .b(b1), .y(n1));

  assign y = out_sel ? n1 : n0;

endmodule
