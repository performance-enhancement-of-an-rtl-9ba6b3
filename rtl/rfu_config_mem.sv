// rfu_config_mem: partitioned configuration memory of the RFU.
//
// A custom instruction (CI) is not stored as one monolithic configuration
// word. Its configuration is split into four parts that are kept in four
// separate tables (P1 functions and intermediate connections, P2 input
// selection, P3 output selection, P4 immediates), and a CI table holds, for
// every CI number, one index into each part table. CIs whose P1 is equal, or
// a subset of another CI's P1, point at the same P1 entry and differ only in
// the small P2/P3/P4 entries; equal P2, P3 or P4 entries are likewise shared.
// This is the merging scheme of the source design; the pointer table that
// realises it and the depths are this implementation's choices.
//
// Interface:
//   write port  we, tbl (TBL_CI/TBL_P1..P4), waddr, wdata (low bits used);
//               a CI-table entry is {p4_idx, p3_idx, p2_idx, p1_idx}
//   CI read     ci_re, ci_raddr -> ci_idx (registered, next cycle)
//   part read   p_re[k], p_raddr[k] -> p1..p4 (registered, next cycle);
//               all four parts can be read in the same cycle
// Timing: synchronous write and read, one cycle of read latency. A read and
// a write of the same entry in one cycle return the old contents.
module rfu_config_mem
  import rfu_pkg::*;
#(
  parameter int CI_DEPTH = 128,
  parameter int P_DEPTH  = 128,
  localparam int CI_AW   = $clog2(CI_DEPTH),
  localparam int IDX_W   = $clog2(P_DEPTH),
  localparam int AW      = (CI_AW > IDX_W) ? CI_AW : IDX_W
) (
  input  logic                                  clk,
  // write port
  input  logic                                  we,
  input  tbl_e                                  tbl,
  input  logic [AW-1:0]                         waddr,
  input  logic [CFG_W-1:0]                      wdata,
  // CI table read
  input  logic                                  ci_re,
  input  logic [CI_AW-1:0]                      ci_raddr,
  output logic [NUM_PARTS-1:0][IDX_W-1:0]       ci_idx,
  // part table reads
  input  logic [NUM_PARTS-1:0]                  p_re,
  input  logic [NUM_PARTS-1:0][IDX_W-1:0]       p_raddr,
  output p1_t                                   p1,
  output p2_t                                   p2,
  output p3_t                                   p3,
  output p4_t                                   p4
);

  logic [NUM_PARTS*IDX_W-1:0] ci_mem [CI_DEPTH];
  p1_t                        p1_mem [P_DEPTH];
  p2_t                        p2_mem [P_DEPTH];
  p3_t                        p3_mem [P_DEPTH];
  p4_t                        p4_mem [P_DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      unique case (tbl)
        TBL_CI: ci_mem[waddr[CI_AW-1:0]] <= wdata[NUM_PARTS*IDX_W-1:0];
        TBL_P1: p1_mem[waddr[IDX_W-1:0]] <= wdata[P1_W-1:0];
        TBL_P2: p2_mem[waddr[IDX_W-1:0]] <= wdata[P2_W-1:0];
        TBL_P3: p3_mem[waddr[IDX_W-1:0]] <= wdata[P3_W-1:0];
        TBL_P4: p4_mem[waddr[IDX_W-1:0]] <= wdata[P4_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (ci_re)   ci_idx <= ci_mem[ci_raddr];
    if (p_re[0]) p1     <= p1_mem[p_raddr[0]];
    if (p_re[1]) p2     <= p2_mem[p_raddr[1]];
    if (p_re[2]) p3     <= p3_mem[p_raddr[2]];
    if (p_re[3]) p4     <= p4_mem[p_raddr[3]];
  end

endmodule
