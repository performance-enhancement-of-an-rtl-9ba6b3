// rfu_array: the heterogeneous reconfigurable functional unit datapath.
//
// Eight FUs in three rows, fed by 8 data inputs and delivering 6 outputs:
//   row 1: uni1 (logic, arith)   uni2 (shift)       tri1 (logic, arith, shift)
//   row 2: tri2 (logic, arith, shift)               bi1  (arith)
//   row 3: uni3 (logic, arith)   tri3 (logic, arith) bi2 (logic, arith, shift)
// Row-1 operands come from the 8 inputs. Each row's outputs feed the next
// row. Ten long connections bypass rows: 4 input lines end at row 2, 5 input
// lines end at row 3 (each line carries one input chosen by P2), and one
// link carries a row-1 result (chosen by P1) to row 3. Three neighbour links
// join FUs inside a row: uni1 -> uni2 and uni2 -> uni1 in row 1, bi1 -> tri2
// in row 2. A value needed two rows down without a long connection is passed
// with a MOV on an intermediate FU.
//
// Operand source numbering (one select per FU operand):
//   row 1 (4 bits): 0-7 input, 8 neighbour (uni1/uni2 only), others give 0
//   row 2 (3 bits): 0 uni1, 1 uni2, 2 tri1, 3-6 L2[0..3], 7 neighbour
//                   (bi1 -> tri2; gives 0 for bi1 itself)
//   row 3 (3 bits): 0 tri2, 1 bi1, 2-6 L3[0..4], 7 row-1 link
// Each output picks one FU result (F_* numbering) or drives 0 when disabled.
//
// The row-1 neighbour links form a structural loop (uni1 -> uni2 -> uni1).
// It is cut functionally: when uni1 takes its operand from uni2, uni2 sees 0
// on its neighbour source, so the array always settles; lint tools still
// report the structural loop, which is intended.
//
// From the source design: the FU kinds, rows and instruction types, the 8/6
// I/O counts, the long connections (4 + 5 + 1) and the three neighbour
// links. This implementation's choices: which inputs the long lines carry
// (any, per configuration), that the row-1 link is selectable, that every
// output can select every FU, and the operand source numbering.
// Timing: purely combinational (the critical path is a configured chain of
// up to three rows of FUs and operand multiplexers).
module rfu_array
  import rfu_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  p1_t                           p1,
  input  p2_t                           p2,
  input  p3_t                           p3,
  input  p4_t                           p4,
  input  logic [NUM_IN-1:0][DATA_W-1:0] din,
  output logic [NUM_OUT-1:0][DATA_W-1:0] dout
);

  typedef logic [DATA_W-1:0] word_t;

  word_t y_uni1, y_uni2, y_tri1, y_tri2, y_bi1, y_uni3, y_tri3, y_bi2;
  word_t nb_uni1, nb_uni2;            // neighbour values seen by uni1 / uni2
  word_t [NUM_L2-1:0] l2;
  word_t [NUM_L3-1:0] l3;
  word_t link13;
  word_t [NUM_FU-1:0] fu_y;

  function automatic word_t pick_r1(sel1_t s, logic [NUM_IN-1:0][DATA_W-1:0] d, word_t nb);
    if (s < 4'(NUM_IN)) return d[s[2:0]];
    if (s == 4'd8)      return nb;
    return '0;
  endfunction

  // ---- long input lines and the row-1 -> row-3 link ------------------------
  always_comb begin
    for (int k = 0; k < NUM_L2; k++) l2[k] = din[p2.l2_src[k]];
    for (int k = 0; k < NUM_L3; k++) l3[k] = din[p2.l3_src[k]];
    unique case (p1.link_sel)
      2'(F_UNI1): link13 = y_uni1;
      2'(F_UNI2): link13 = y_uni2;
      default:    link13 = y_tri1;
    endcase
  end

  // ---- row 1 ---------------------------------------------------------------
  // Cut of the uni1 <-> uni2 loop: uni1 has priority.
  assign nb_uni1 = y_uni2;
  assign nb_uni2 = ((p2.uni1_src[0] == 4'd8) || (p2.uni1_src[1] == 4'd8)) ? '0 : y_uni1;

  fu_node #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH)) u_uni1 (
    .fn(p1.fn[N_UNI1]), .imm(p4.imm[N_UNI1]),
    .a(pick_r1(p2.uni1_src[0], din, nb_uni1)),
    .b(pick_r1(p2.uni1_src[1], din, nb_uni1)),
    .y(y_uni1));

  fu_node #(.DATA_W(DATA_W), .TYPES(T_SHIFT)) u_uni2 (
    .fn(p1.fn[N_UNI2]), .imm(p4.imm[N_UNI2]),
    .a(pick_r1(p2.uni2_src[0], din, nb_uni2)),
    .b(pick_r1(p2.uni2_src[1], din, nb_uni2)),
    .y(y_uni2));

  tri_fu #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH | T_SHIFT)) u_tri1 (
    .fn(p1.fn[N_TRI1+2:N_TRI1]), .imm(p4.imm[N_TRI1+2:N_TRI1]), .mode(p1.t1_mode),
    .a0(pick_r1(p2.tri1_src[0], din, '0)),
    .b0(pick_r1(p2.tri1_src[1], din, '0)),
    .x1(pick_r1(p2.tri1_src[2], din, '0)),
    .x2(pick_r1(p2.tri1_src[3], din, '0)),
    .y(y_tri1));

  // ---- row 2 ---------------------------------------------------------------
  word_t [7:0] r2_tri, r2_bi;
  assign r2_tri = {y_bi1, l2, y_tri1, y_uni2, y_uni1};
  assign r2_bi  = {word_t'('0), l2, y_tri1, y_uni2, y_uni1};

  tri_fu #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH | T_SHIFT)) u_tri2 (
    .fn(p1.fn[N_TRI2+2:N_TRI2]), .imm(p4.imm[N_TRI2+2:N_TRI2]), .mode(p1.t2_mode),
    .a0(r2_tri[p1.tri2_src[0]]), .b0(r2_tri[p1.tri2_src[1]]),
    .x1(r2_tri[p1.tri2_src[2]]), .x2(r2_tri[p1.tri2_src[3]]),
    .y(y_tri2));

  bi_fu #(.DATA_W(DATA_W), .TYPES(T_ARITH)) u_bi1 (
    .fn(p1.fn[N_BI1+1:N_BI1]), .imm(p4.imm[N_BI1+1:N_BI1]), .out_sel(p1.bi1_out),
    .a0(r2_bi[p1.bi1_src[0]]), .b0(r2_bi[p1.bi1_src[1]]), .b1(r2_bi[p1.bi1_src[2]]),
    .y(y_bi1));

  // ---- row 3 ---------------------------------------------------------------
  word_t [7:0] r3;
  assign r3 = {link13, l3, y_bi1, y_tri2};

  fu_node #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH)) u_uni3 (
    .fn(p1.fn[N_UNI3]), .imm(p4.imm[N_UNI3]),
    .a(r3[p1.uni3_src[0]]), .b(r3[p1.uni3_src[1]]),
    .y(y_uni3));

  tri_fu #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH)) u_tri3 (
    .fn(p1.fn[N_TRI3+2:N_TRI3]), .imm(p4.imm[N_TRI3+2:N_TRI3]), .mode(p1.t3_mode),
    .a0(r3[p1.tri3_src[0]]), .b0(r3[p1.tri3_src[1]]),
    .x1(r3[p1.tri3_src[2]]), .x2(r3[p1.tri3_src[3]]),
    .y(y_tri3));

  bi_fu #(.DATA_W(DATA_W), .TYPES(T_LOGIC | T_ARITH | T_SHIFT)) u_bi2 (
    .fn(p1.fn[N_BI2+1:N_BI2]), .imm(p4.imm[N_BI2+1:N_BI2]), .out_sel(p1.bi2_out),
    .a0(r3[p1.bi2_src[0]]), .b0(r3[p1.bi2_src[1]]), .b1(r3[p1.bi2_src[2]]),
    .y(y_bi2));

  // ---- outputs -------------------------------------------------------------
  always_comb begin
    fu_y[F_UNI1] = y_uni1;
    fu_y[F_UNI2] = y_uni2;
    fu_y[F_TRI1] = y_tri1;
    fu_y[F_TRI2] = y_tri2;
    fu_y[F_BI1]  = y_bi1;
    fu_y[F_UNI3] = y_uni3;
    fu_y[F_TRI3] = y_tri3;
    fu_y[F_BI2]  = y_bi2;
  end

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++)
      dout[o] = p3.en[o] ? fu_y[p3.sel[o]] : '0;
  end

endmodule
