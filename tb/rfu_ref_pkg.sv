// rfu_ref_pkg: reference model of the RFU used by the testbenches.
//
// Written independently of the RTL from the architecture description: an
// instruction table evaluated with plain integer arithmetic, and the
// heterogeneous array evaluated FU by FU in row order. 32-bit data only.
package rfu_ref_pkg;
  import rfu_pkg::*;

  typedef bit [31:0] w_t;

  // Instruction type of an opcode number: 0 = MOV (always), 1..3 = type, 4 = invalid.
  function automatic int ref_type(int op);
    if (op == 0) return 0;
    if (op >= 1 && op <= 4) return 1;
    if (op >= 5 && op <= 8) return 2;
    if (op >= 9 && op <= 12) return 3;
    return 4;
  endfunction

  function automatic w_t ref_alu(int op, w_t a, w_t b, bit [2:0] types);
    int t = ref_type(op);
    int sa = int'(b % 32);
    longint sxa = longint'(signed'(a));
    longint sxb = longint'(signed'(b));
    if (t == 4) return 0;
    if (t != 0 && !types[t-1]) return 0;
    case (op)
      0:  return a;
      1:  return a & b;
      2:  return a | b;
      3:  return a ^ b;
      4:  return ~(a | b);
      5:  return w_t'(longint'(a) + longint'(b));
      6:  return w_t'(longint'(a) - longint'(b));
      7:  return (sxa < sxb) ? 1 : 0;
      8:  return (longint'(a) < longint'(b)) ? 1 : 0;
      9:  return w_t'(longint'(a) * (longint'(1) << sa));
      10: return w_t'(longint'(a) / (longint'(1) << sa));
      11: begin
            // arithmetic shift: floor division by 2^sa
            longint q = sxa >>> sa;
            return w_t'(q);
          end
      12: return w_t'(longint'(b) * 65536);
      default: return 0;
    endcase
  endfunction

  function automatic w_t ref_node(node_fn_t fn, bit [15:0] imm, w_t a, w_t b, bit [2:0] types);
    w_t iv, bb, x, y;
    iv = fn.imm_sext && imm[15] ? {16'hffff, imm} : {16'h0000, imm};
    bb = fn.use_imm ? iv : b;
    if (fn.swap) begin x = bb; y = a; end else begin x = a; y = bb; end
    return ref_alu(int'(fn.op), x, y, types);
  endfunction

  function automatic w_t ref_bi(node_fn_t f0, node_fn_t f1, bit [15:0] i0, bit [15:0] i1,
                                bit osel, w_t a0, w_t b0, w_t b1, bit [2:0] types);
    w_t n0 = ref_node(f0, i0, a0, b0, types);
    w_t n1 = ref_node(f1, i1, n0, b1, types);
    return osel ? n1 : n0;
  endfunction

  function automatic w_t ref_tri(node_fn_t f0, node_fn_t f1, node_fn_t f2,
                                 bit [15:0] i0, bit [15:0] i1, bit [15:0] i2,
                                 tri_mode_t m, w_t a0, w_t b0, w_t x1, w_t x2, bit [2:0] types);
    w_t n0, n1, n2;
    n0 = ref_node(f0, i0, a0, b0, types);
    if (m.tree) begin
      n1 = ref_node(f1, i1, x1, x2, types);
      n2 = ref_node(f2, i2, n0, n1, types);
    end else begin
      n1 = ref_node(f1, i1, n0, x1, types);
      n2 = ref_node(f2, i2, n1, x2, types);
    end
    if (m.out_sel == 0) return n0;
    if (m.out_sel == 1) return n1;
    return n2;
  endfunction

  // Whole array. Returns the 6 outputs packed as out[o].
  function automatic void ref_array(input p1_t p1, input p2_t p2, input p3_t p3, input p4_t p4,
                                    input w_t din [8], output w_t dout [6]);
    w_t fu [8];
    w_t l2 [4];
    w_t l3 [5];
    w_t s1a, s1b, lk;
    w_t r2 [8];
    w_t r3 [8];
    w_t r1op [4];
    bit uni1_nb;
    for (int k = 0; k < 4; k++) l2[k] = din[p2.l2_src[k]];
    for (int k = 0; k < 5; k++) l3[k] = din[p2.l3_src[k]];
    // row 1: decide the evaluation order of the neighbour pair
    uni1_nb = (p2.uni1_src[0] == 8) || (p2.uni1_src[1] == 8);
    if (uni1_nb) begin
      // uni2 first, its neighbour source reads 0
      s1a = r1src(p2.uni2_src[0], din, 0);
      s1b = r1src(p2.uni2_src[1], din, 0);
      fu[1] = ref_node(p1.fn[1], p4.imm[1], s1a, s1b, 3'b100);
      s1a = r1src(p2.uni1_src[0], din, fu[1]);
      s1b = r1src(p2.uni1_src[1], din, fu[1]);
      fu[0] = ref_node(p1.fn[0], p4.imm[0], s1a, s1b, 3'b011);
    end else begin
      s1a = r1src(p2.uni1_src[0], din, 0);
      s1b = r1src(p2.uni1_src[1], din, 0);
      fu[0] = ref_node(p1.fn[0], p4.imm[0], s1a, s1b, 3'b011);
      s1a = r1src(p2.uni2_src[0], din, fu[0]);
      s1b = r1src(p2.uni2_src[1], din, fu[0]);
      fu[1] = ref_node(p1.fn[1], p4.imm[1], s1a, s1b, 3'b100);
    end
    for (int k = 0; k < 4; k++) r1op[k] = r1src(p2.tri1_src[k], din, 0);
    fu[2] = ref_tri(p1.fn[2], p1.fn[3], p1.fn[4], p4.imm[2], p4.imm[3], p4.imm[4], p1.t1_mode,
                    r1op[0], r1op[1], r1op[2], r1op[3], 3'b111);
    // row 2: bi1 first (it feeds tri2 through the neighbour link)
    r2[0] = fu[0]; r2[1] = fu[1]; r2[2] = fu[2];
    for (int k = 0; k < 4; k++) r2[3+k] = l2[k];
    r2[7] = 0;
    fu[4] = ref_bi(p1.fn[8], p1.fn[9], p4.imm[8], p4.imm[9], p1.bi1_out,
                   r2[p1.bi1_src[0]], r2[p1.bi1_src[1]], r2[p1.bi1_src[2]], 3'b010);
    r2[7] = fu[4];
    fu[3] = ref_tri(p1.fn[5], p1.fn[6], p1.fn[7], p4.imm[5], p4.imm[6], p4.imm[7], p1.t2_mode,
                    r2[p1.tri2_src[0]], r2[p1.tri2_src[1]], r2[p1.tri2_src[2]], r2[p1.tri2_src[3]], 3'b111);
    // row 3
    case (p1.link_sel)
      0: lk = fu[0];
      1: lk = fu[1];
      default: lk = fu[2];
    endcase
    r3[0] = fu[3]; r3[1] = fu[4];
    for (int k = 0; k < 5; k++) r3[2+k] = l3[k];
    r3[7] = lk;
    fu[5] = ref_node(p1.fn[10], p4.imm[10], r3[p1.uni3_src[0]], r3[p1.uni3_src[1]], 3'b011);
    fu[6] = ref_tri(p1.fn[11], p1.fn[12], p1.fn[13], p4.imm[11], p4.imm[12], p4.imm[13], p1.t3_mode,
                    r3[p1.tri3_src[0]], r3[p1.tri3_src[1]], r3[p1.tri3_src[2]], r3[p1.tri3_src[3]], 3'b011);
    fu[7] = ref_bi(p1.fn[14], p1.fn[15], p4.imm[14], p4.imm[15], p1.bi2_out,
                   r3[p1.bi2_src[0]], r3[p1.bi2_src[1]], r3[p1.bi2_src[2]], 3'b111);
    for (int o = 0; o < 6; o++) dout[o] = p3.en[o] ? fu[p3.sel[o]] : 0;
  endfunction

  function automatic w_t r1src(bit [3:0] s, w_t din [8], w_t nb);
    if (s < 8) return din[s[2:0]];
    if (s == 8) return nb;
    return 0;
  endfunction

  // Random fill helpers.
  function automatic node_fn_t rand_fn();
    node_fn_t f;
    f = node_fn_t'($urandom);
    f.op = op_e'($urandom_range(0, 12));
    return f;
  endfunction

  function automatic w_t rand_word();
    case ($urandom_range(0, 3))
      0: return $urandom_range(0, 40);
      1: return 32'hffff_ffff - $urandom_range(0, 40);
      default: return $urandom;
    endcase
  endfunction

  function automatic p1_t rand_p1();
    p1_t p;
    for (int i = 0; i < $bits(p1_t); i += 32) p[i +: 32] = $urandom;
    for (int n = 0; n < NUM_NODES; n++) p.fn[n] = rand_fn();
    return p;
  endfunction
  function automatic p2_t rand_p2();
    p2_t p;
    for (int i = 0; i < $bits(p2_t); i += 32) p[i +: 32] = $urandom;
    for (int k = 0; k < 2; k++) begin
      p.uni1_src[k] = 4'($urandom_range(0, 9));
      p.uni2_src[k] = 4'($urandom_range(0, 9));
    end
    for (int k = 0; k < 4; k++) p.tri1_src[k] = 4'($urandom_range(0, 8));
    return p;
  endfunction
  function automatic p3_t rand_p3();
    p3_t p;
    p = p3_t'($urandom);
    p.en = 6'($urandom) | 6'b010101;
    return p;
  endfunction
  function automatic p4_t rand_p4();
    p4_t p;
    for (int i = 0; i < $bits(p4_t); i += 32) p[i +: 32] = $urandom;
    return p;
  endfunction
endpackage
