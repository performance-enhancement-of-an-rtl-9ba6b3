// rfu_ctrl: issue and partial-reconfiguration controller of the RFU.
//
// The RFU keeps one active configuration, made of four parts (P1..P4). The
// controller remembers which table entry each active part came from. When a
// custom instruction (CI) is issued it looks up the CI's four part indices
// and compares them with the loaded ones; only the parts that differ are
// read from the configuration memory and loaded (partial reconfiguration).
// If all four match, no reconfiguration happens at all. Sharing of parts
// between similar CIs therefore turns many context switches into none or
// into a reload of the small parts only. Writing a part-table entry that is
// currently loaded marks that part stale, so the next CI reloads it.
//
// States: IDLE (ready; accept ci_valid, read the CI table) -> LOOK (compare)
// -> [LOAD (capture the differing parts)] -> EXEC (array evaluates, result
// captured) -> IDLE. exec_en is high in the cycle after the accepting clock
// edge, or one cycle later when parts must be loaded; the unit is ready
// again one cycle after exec_en. One CI is in flight at a time.
// Counters (wrap around): CIs executed, context switches (CIs that needed a
// load), and loads per part. The split into parts follows the source design;
// the state machine, its latency and the counters are this implementation's.
module rfu_ctrl
  import rfu_pkg::*;
#(
  parameter int CI_DEPTH = 128,
  parameter int P_DEPTH  = 128,
  localparam int CI_AW   = $clog2(CI_DEPTH),
  localparam int IDX_W   = $clog2(P_DEPTH),
  localparam int AW      = (CI_AW > IDX_W) ? CI_AW : IDX_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // CI issue handshake
  input  logic                              ci_valid,
  output logic                              ci_ready,
  input  logic [CI_AW-1:0]                  ci_id,
  // configuration writes (snooped for stale parts)
  input  logic                              cfg_we,
  input  tbl_e                              cfg_tbl,
  input  logic [AW-1:0]                     cfg_waddr,
  // configuration memory
  output logic                              ci_re,
  output logic [CI_AW-1:0]                  ci_raddr,
  input  logic [NUM_PARTS-1:0][IDX_W-1:0]   ci_idx,
  output logic [NUM_PARTS-1:0]              p_re,
  output logic [NUM_PARTS-1:0][IDX_W-1:0]   p_raddr,
  // datapath control
  output logic [NUM_PARTS-1:0]              load_en,   // capture part k now
  output logic                              exec_en,   // capture array outputs now
  // statistics
  output logic [31:0]                       ci_count,
  output logic [31:0]                       ctx_switches,
  output logic [NUM_PARTS-1:0][31:0]        part_loads
);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_LOAD, S_EXEC} state_e;

  state_e                            state;
  logic [NUM_PARTS-1:0][IDX_W-1:0]   loaded_idx;
  logic [NUM_PARTS-1:0]              loaded_v;
  logic [NUM_PARTS-1:0]              pending;
  logic [NUM_PARTS-1:0]              miss;
  logic [NUM_PARTS-1:0]              stale;
  logic [NUM_PARTS-1:0][IDX_W-1:0]   p_raddr_q;  // indices being loaded

  always_ff @(posedge clk) if (state == S_LOOK) p_raddr_q <= ci_idx;

  always_comb begin
    for (int k = 0; k < NUM_PARTS; k++) begin
      miss[k]  = !loaded_v[k] || (loaded_idx[k] != ci_idx[k]);
      stale[k] = cfg_we && (cfg_tbl == tbl_e'(k + 1)) &&
                 (cfg_waddr[IDX_W-1:0] == loaded_idx[k]);
    end
  end

  assign ci_ready = (state == S_IDLE);
  assign ci_re    = ci_valid && ci_ready;
  assign ci_raddr = ci_id;
  assign p_re     = (state == S_LOOK) ? miss : '0;
  assign p_raddr  = ci_idx;
  assign load_en  = (state == S_LOAD) ? pending : '0;
  assign exec_en  = (state == S_EXEC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      loaded_idx   <= '0;
      loaded_v     <= '0;
      pending      <= '0;
      ci_count     <= '0;
      ctx_switches <= '0;
      part_loads   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ci_valid) state <= S_LOOK;
        S_LOOK: begin
          pending <= miss;
          if (miss != '0) begin
            state        <= S_LOAD;
            ctx_switches <= ctx_switches + 32'd1;
          end else begin
            state <= S_EXEC;
          end
        end
        S_LOAD: begin
          for (int k = 0; k < NUM_PARTS; k++) begin
            if (pending[k]) begin
              loaded_idx[k] <= p_raddr_q[k];
              loaded_v[k]   <= 1'b1;
              part_loads[k] <= part_loads[k] + 32'd1;
            end
          end
          state <= S_EXEC;
        end
        S_EXEC: begin
          ci_count <= ci_count + 32'd1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // A write into a loaded part entry makes the active copy stale; this
      // takes precedence over a load in the same cycle.
      for (int k = 0; k < NUM_PARTS; k++)
        if (stale[k]) loaded_v[k] <= 1'b0;
    end
  end

  // Handshake rule for the requester: a request that is not accepted stays
  // asserted with the same CI number.
  a_hold_request: assert property (
    @(posedge clk) disable iff (!rst_n)
      (ci_valid && !ci_ready) |=> (ci_valid && $stable(ci_id)))
    else $error("rfu_ctrl: CI request dropped or changed while waiting");

endmodule
