// tb_rfu_config_mem: self-checking test of the partitioned configuration memory.
//
// Fills the CI table and the four part tables with random contents through
// the write port, keeps a shadow copy, and reads every entry back through
// the CI port and the four part ports (all four parts in the same cycle),
// checking the one-cycle read latency and that a disabled read port holds
// its output. A read and write of one entry in the same cycle must return
// the old contents.
module tb_rfu_config_mem;
  import rfu_pkg::*;

  localparam int CI_DEPTH = 16;
  localparam int P_DEPTH  = 8;
  localparam int IDX_W    = $clog2(P_DEPTH);

  logic clk = 0;
  logic we, ci_re;
  tbl_e tbl;
  logic [3:0] waddr, ci_raddr;
  logic [CFG_W-1:0] wdata;
  logic [NUM_PARTS-1:0][IDX_W-1:0] ci_idx;
  logic [NUM_PARTS-1:0] p_re;
  logic [NUM_PARTS-1:0][IDX_W-1:0] p_raddr;
  p1_t p1; p2_t p2; p3_t p3; p4_t p4;
  int checks = 0, failures = 0;

  logic [NUM_PARTS*IDX_W-1:0] sh_ci [CI_DEPTH];
  logic [CFG_W-1:0] sh_p [4][P_DEPTH];

  rfu_config_mem #(.CI_DEPTH(CI_DEPTH), .P_DEPTH(P_DEPTH)) dut (
    .clk, .we, .tbl, .waddr, .wdata, .ci_re, .ci_raddr, .ci_idx, .p_re, .p_raddr,
    .p1, .p2, .p3, .p4);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [CFG_W-1:0] got, logic [CFG_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [CFG_W-1:0] rnd();
    logic [CFG_W-1:0] v;
    for (int i = 0; i < CFG_W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ci_re = 0; p_re = '0; tbl = TBL_CI; waddr = 0; wdata = '0; ci_raddr = 0; p_raddr = '0;
    @(negedge clk);
    for (int a = 0; a < CI_DEPTH; a++) begin
      we = 1; tbl = TBL_CI; waddr = 4'(a); wdata = rnd();
      sh_ci[a] = wdata[NUM_PARTS*IDX_W-1:0];
      @(negedge clk);
    end
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < P_DEPTH; a++) begin
        we = 1; tbl = tbl_e'(t + 1); waddr = 4'(a); wdata = rnd();
        sh_p[t][a] = wdata;
        @(negedge clk);
      end
    we = 0;
    // read back: CI entry a and part entries (a + t) mod depth, all at once
    for (int a = 0; a < CI_DEPTH; a++) begin
      ci_re = 1; ci_raddr = 4'(a); p_re = 4'b1111;
      for (int t = 0; t < 4; t++) p_raddr[t] = IDX_W'((a + t) % P_DEPTH);
      @(posedge clk); #1;
      chk($sformatf("ci %0d", a), CFG_W'(ci_idx), CFG_W'(sh_ci[a]));
      chk($sformatf("p1 %0d", a), CFG_W'(p1), sh_p[0][(a + 0) % P_DEPTH] & CFG_W'({P1_W{1'b1}}));
      chk($sformatf("p2 %0d", a), CFG_W'(p2), sh_p[1][(a + 1) % P_DEPTH] & CFG_W'({P2_W{1'b1}}));
      chk($sformatf("p3 %0d", a), CFG_W'(p3), sh_p[2][(a + 2) % P_DEPTH] & CFG_W'({P3_W{1'b1}}));
      chk($sformatf("p4 %0d", a), CFG_W'(p4), sh_p[3][(a + 3) % P_DEPTH] & CFG_W'({P4_W{1'b1}}));
      @(negedge clk);
    end
    // disabled read ports hold their last output
    ci_re = 0; p_re = 4'b0000; ci_raddr = 0; p_raddr = '0;
    @(posedge clk); #1;
    chk("ci hold", CFG_W'(ci_idx), CFG_W'(sh_ci[CI_DEPTH-1]));
    chk("p4 hold", CFG_W'(p4), sh_p[3][(CI_DEPTH-1+3) % P_DEPTH] & CFG_W'({P4_W{1'b1}}));
    // only P3 read enabled: P3 changes, P1 holds
    @(negedge clk);
    p_re = 4'b0100; p_raddr[2] = 3'd5; p_raddr[0] = 3'd6;
    @(posedge clk); #1;
    chk("p3 alone", CFG_W'(p3), sh_p[2][5] & CFG_W'({P3_W{1'b1}}));
    chk("p1 held while p3 read", CFG_W'(p1), sh_p[0][(CI_DEPTH-1) % P_DEPTH] & CFG_W'({P1_W{1'b1}}));
    // read-during-write returns old data, new data visible next read
    @(negedge clk);
    p_re = 4'b0001; p_raddr[0] = 3'd2; we = 1; tbl = TBL_P1; waddr = 4'd2; wdata = rnd();
    @(posedge clk); #1;
    chk("read during write gives old", CFG_W'(p1), sh_p[0][2] & CFG_W'({P1_W{1'b1}}));
    sh_p[0][2] = wdata;
    @(negedge clk);
    we = 0;
    @(posedge clk); #1;
    chk("new data after write", CFG_W'(p1), sh_p[0][2] & CFG_W'({P1_W{1'b1}}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
