// amber_rfu: heterogeneous reconfigurable functional unit with its
// partitioned configuration memory and reconfiguration controller.
//
// This is the tightly coupled accelerator of an extensible processor: the
// host core issues a custom instruction (CI) number together with up to 8
// operand words and receives up to 6 result words. Inside, rfu_ctrl checks
// which of the four configuration parts of the CI are already active,
// reloads only the others from rfu_config_mem into the active configuration
// registers, and then lets the combinational rfu_array evaluate the CI on
// the latched operands; the outputs are registered.
//
// Interface:
//   configuration write: cfg_we, cfg_tbl, cfg_waddr, cfg_wdata (see
//     rfu_config_mem; a CI entry is {p4_idx, p3_idx, p2_idx, p1_idx})
//   issue: ci_valid/ci_ready handshake, ci_id, ci_in[8] (captured on the
//     accepting edge)
//   result: res_valid (one-cycle pulse), res_data[6], res_en[6] (which
//     outputs the CI drives; disabled outputs read 0)
//   statistics: ci_count, ctx_switches, part_loads[4]
// Timing: res_valid is high for one cycle, 2 clock cycles after the
// accepting edge, or 3 when the CI needs a reconfiguration; ci_ready returns
// together with res_valid, so back-to-back CIs issue every 3 (or 4) cycles. The array itself is one combinational path
// between the operand and result registers.
//
// The processor core, its profiler and the CI generation/mapping tool chain
// are outside this unit. The handshake, latency and register placement are
// this implementation's choices.
module amber_rfu
  import rfu_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int CI_DEPTH = 128,
  parameter int P_DEPTH  = 128,
  localparam int CI_AW   = $clog2(CI_DEPTH),
  localparam int IDX_W   = $clog2(P_DEPTH),
  localparam int AW      = (CI_AW > IDX_W) ? CI_AW : IDX_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration write port
  input  logic                             cfg_we,
  input  tbl_e                             cfg_tbl,
  input  logic [AW-1:0]                    cfg_waddr,
  input  logic [CFG_W-1:0]                 cfg_wdata,
  // CI issue
  input  logic                             ci_valid,
  output logic                             ci_ready,
  input  logic [CI_AW-1:0]                 ci_id,
  input  logic [NUM_IN-1:0][DATA_W-1:0]    ci_in,
  // CI result
  output logic                             res_valid,
  output logic [NUM_OUT-1:0][DATA_W-1:0]   res_data,
  output logic [NUM_OUT-1:0]               res_en,
  // statistics
  output logic [31:0]                      ci_count,
  output logic [31:0]                      ctx_switches,
  output logic [NUM_PARTS-1:0][31:0]       part_loads
);

  logic [NUM_PARTS-1:0][IDX_W-1:0] ci_idx;
  logic [NUM_PARTS-1:0]            p_re, load_en;
  logic [NUM_PARTS-1:0][IDX_W-1:0] p_raddr;
  logic                            ci_re, exec_en;
  logic [CI_AW-1:0]                ci_raddr;

  p1_t m_p1, a_p1;   // memory read data / active configuration
  p2_t m_p2, a_p2;
  p3_t m_p3, a_p3;
  p4_t m_p4, a_p4;

  logic [NUM_IN-1:0][DATA_W-1:0]  din_q;
  logic [NUM_OUT-1:0][DATA_W-1:0] dout;

  rfu_config_mem #(.CI_DEPTH(CI_DEPTH), .P_DEPTH(P_DEPTH)) u_mem (
    .clk      (clk),
    .we       (cfg_we),
    .tbl      (cfg_tbl),
    .waddr    (cfg_waddr),
    .wdata    (cfg_wdata),
    .ci_re    (ci_re),
    .ci_raddr (ci_raddr),
    .ci_idx   (ci_idx),
    .p_re     (p_re),
    .p_raddr  (p_raddr),
    .p1       (m_p1),
    .p2       (m_p2),
    .p3       (m_p3),
    .p4       (m_p4)
  );

  rfu_ctrl #(.CI_DEPTH(CI_DEPTH), .P_DEPTH(P_DEPTH)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .ci_valid     (ci_valid),
    .ci_ready     (ci_ready),
    .ci_id        (ci_id),
    .cfg_we       (cfg_we),
    .cfg_tbl      (cfg_tbl),
    .cfg_waddr    (cfg_waddr),
    .ci_re        (ci_re),
    .ci_raddr     (ci_raddr),
    .ci_idx       (ci_idx),
    .p_re         (p_re),
    .p_raddr      (p_raddr),
    .load_en      (load_en),
    .exec_en      (exec_en),
    .ci_count     (ci_count),
    .ctx_switches (ctx_switches),
    .part_loads   (part_loads)
  );

  // Active configuration registers (partial reconfiguration: one enable per part).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_p1 <= '0;
      a_p2 <= '0;
      a_p3 <= '0;
      a_p4 <= '0;
    end else begin
      if (load_en[0]) a_p1 <= m_p1;
      if (load_en[1]) a_p2 <= m_p2;
      if (load_en[2]) a_p3 <= m_p3;
      if (load_en[3]) a_p4 <= m_p4;
    end
  end

  // Operand latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     din_q <= '0;
    else if (ci_re) din_q <= ci_in;
  end

  rfu_array #(.DATA_W(DATA_W)) u_array (
    .p1   (a_p1),
    .p2   (a_p2),
    .p3   (a_p3),
    .p4   (a_p4),
    .din  (din_q),
    .dout (dout)
  );

  // Result registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_data  <= '0;
      res_en    <= '0;
    end else begin
      res_valid <= exec_en;
      if (exec_en) begin
        res_data <= dout;
        res_en   <= a_p3.en;
      end
    end
  end

endmodule
