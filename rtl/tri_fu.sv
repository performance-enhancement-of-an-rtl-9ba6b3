// tri_fu: tri-instruction functional unit.
//
// Three fu_node instances that together execute any regular sub-graph of up
// to three instructions (a regular graph is one where no result feeds more
// than one instruction). Two shapes exist:
//   chain (tree=0): n0 = f0(a0,b0)  n1 = f1(n0,x1)  n2 = f2(n1,x2)
//   tree  (tree=1): n0 = f0(a0,b0)  n1 = f1(x1,x2)  n2 = f2(n0,n1)
// out_sel delivers n0, n1 or n2 (2 and 3 both select n2), so one, two or
// three instructions can be mapped. The swap bit of each node lets a chained
// value be used as the second operand.
//
// The two shapes are those the source design lists for tri-instruction FUs;
// how the four external operands are shared between the shapes is this
// implementation's choice. Timing: purely combinational.
module tri_fu
  import rfu_pkg::*;
#(
  parameter int         DATA_W = 32,
  parameter logic [2:0] TYPES  = 3'b111
) (
  input  node_fn_t [2:0]           fn,
  input  logic [2:0][IMM_W-1:0]    imm,
  input  tri_mode_t                mode,
  input  logic [DATA_W-1:0]        a0,
  input  logic [DATA_W-1:0]        b0,
  input  logic [DATA_W-1:0]        x1,
  input  logic [DATA_W-1:0]        x2,
  output logic [DATA_W-1:0]        y
);

  logic [DATA_W-1:0] n0, n1, n2;
  logic [DATA_W-1:0] n1_a, n1_b, n2_a, n2_b;

  always_comb begin
    if (mode.tree) begin
      n1_a = x1;  n1_b = x2;
      n2_a = n0;  n2_b = n1;
    end else begin
      n1_a = n0;  n1_b = x1;
      n2_a = n1;  n2_b = x2;
    end
  end

  fu_node #(.DATA_W(DATA_W), .TYPES(TYPES)) u_n0 (.fn(fn[0]), .imm(imm[0]), .a(a0),   .b(b0),   .y(n0));
  fu_node #(.DATA_W(DATA_W), .TYPES(TYPES)) u_n1 (.fn(fn[1]), .imm(imm[1]), .a(n1_a), .b(n1_b), .y(n1));
  fu_node #(.DATA_W(DATA_W), .TYPES(TYPES)) u_n2 (.fn(fn[2]), .imm(imm[2]), .a(n2_a), .b(n2_b), .y(n2));

  always_comb begin
    unique case (mode.out_sel)
      2'd0:    y = n0;
      2'd1:    y = n1;
      default: y = n2;
    endcase
  end

endmodule
