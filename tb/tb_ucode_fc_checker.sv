// tb_ucode_fc_checker: self-checking test of the microcode coverage checker.
// Drives the SRAM pins with directed and random read/write/idle cycles over a
// small address window around SRC_PC so that both coverage bins fire often.
// A reference model keeps the last two cycles of the bus and decides, per
// cycle, whether the step-next (SRC, SRC+1, SRC+2) or the branch (SRC, SRC+1,
// DST) bin must fire; hits, counts and sticky flags are compared with it.
// The same two sequences are also written as SVA properties: whenever the
// bus shows one of them, the matching hit output must be high.
module tb_ucode_fc_checker;
  localparam int AW = 16;
  localparam logic [AW-1:0] SRC = 16'h04d7;
  localparam logic [AW-1:0] DST = 16'h04e9;

  logic clk = 1'b0, rstn = 1'b0;
  logic csn = 1'b1, wen = 1'b1;
  logic [AW-1:0] a = '0;
  logic step_hit, br_hit, step_cov, br_cov;
  logic [15:0] step_cnt, br_cnt;
  int checks = 0, failures = 0;
  int m_step = 0, m_br = 0;
  // reference model history: was cycle t-1 / t-2 a read of SRC / SRC+1
  logic h1_src = 1'b0, h2_src = 1'b0, h1_slot = 1'b0;

  ucode_fc_checker #(.AW(AW), .SRC_PC(SRC), .DST_PC(DST)) dut (
    .i_clk(clk), .i_rstn(rstn), .i_inst_mem_csn(csn), .i_inst_mem_wen(wen), .i_inst_mem_a(a),
    .o_step_next_hit(step_hit), .o_branch_hit(br_hit),
    .o_step_next_covered(step_cov), .o_branch_covered(br_cov),
    .o_step_next_count(step_cnt), .o_branch_count(br_cnt));

  always #5 clk = ~clk;

  wire rd = !csn && wen;

  AST_UCODE_STEP_NEXT: assert property (@(posedge clk) disable iff (!rstn)
    (rd && a == SRC) ##1 (rd && a == SRC + 16'd1) ##1 (rd && a == SRC + 16'd2) |-> step_hit)
    else begin failures++; $display("FAIL SVA step_next sequence without hit"); end
  AST_UCODE_BRANCH: assert property (@(posedge clk) disable iff (!rstn)
    (rd && a == SRC) ##1 (rd && a == SRC + 16'd1) ##1 (rd && a == DST) |-> br_hit)
    else begin failures++; $display("FAIL SVA branch sequence without hit"); end

  // reference model and per-cycle comparison, sampled before the clock edge
  always @(negedge clk) if (rstn) begin
    logic e_step, e_br;
    #4;
    e_step = h2_src && h1_slot && rd && (a == SRC + 16'd2);
    e_br   = h2_src && h1_slot && rd && (a == DST);
    checks++;
    if (step_hit !== e_step || br_hit !== e_br) begin
      failures++;
      $display("FAIL t=%0t a=%h hit step %b/%b branch %b/%b", $time, a, step_hit, e_step, br_hit, e_br);
    end
    m_step += int'(e_step);
    m_br   += int'(e_br);
  end
  always @(posedge clk) begin
    if (!rstn) begin
      h1_src <= 1'b0; h2_src <= 1'b0; h1_slot <= 1'b0;
    end else begin
      h2_src  <= h1_src;
      h1_src  <= rd && (a == SRC);
      h1_slot <= rd && (a == SRC + 16'd1);
    end
  end

  task automatic cyc(logic c, logic w, logic [AW-1:0] ad);
    @(negedge clk); csn = c; wen = w; a = ad;
  endtask
  task automatic rd_seq(logic [AW-1:0] a0, logic [AW-1:0] a1, logic [AW-1:0] a2);
    cyc(0, 1, a0); cyc(0, 1, a1); cyc(0, 1, a2); cyc(1, 1, 16'h0);
  endtask
  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    // nothing covered yet
    @(negedge clk);
    expect_eq(int'(step_cov), 0, "step covered after reset");
    expect_eq(int'(br_cov), 0, "branch covered after reset");
    // directed: branch not taken, then taken
    rd_seq(SRC, SRC + 1, SRC + 2);
    expect_eq(int'(step_cov), 1, "step covered");
    expect_eq(int'(br_cov), 0, "branch not yet covered");
    rd_seq(SRC, SRC + 1, DST);
    expect_eq(int'(br_cov), 1, "branch covered");
    // near misses: a write or an idle cycle in the middle, wrong order
    cyc(0, 1, SRC); cyc(0, 0, SRC + 1); cyc(0, 1, SRC + 2); cyc(1, 1, 0);
    cyc(0, 1, SRC); cyc(1, 1, SRC + 1); cyc(0, 1, SRC + 1); cyc(0, 1, DST); cyc(1, 1, 0);
    rd_seq(SRC + 1, SRC, DST);
    rd_seq(SRC, SRC + 2, DST);
    expect_eq(int'(step_cnt), 1, "step count after near misses");
    expect_eq(int'(br_cnt), 1, "branch count after near misses");
    // random traffic in a window around SRC and DST
    for (int i = 0; i < 20000; i++) begin
      logic [AW-1:0] ad;
      int r;
      r = $urandom_range(0, 9);
      ad = (r < 4) ? SRC + AW'(i % 3) : (r < 6) ? DST : (r < 8) ? SRC + AW'($urandom_range(0, 3)) : AW'($urandom);
      cyc(($urandom_range(0, 15) == 0), ($urandom_range(0, 15) != 0), ad);
    end
    cyc(1, 1, 0);
    @(negedge clk);
    expect_eq(int'(step_cnt), m_step, "step count vs model");
    expect_eq(int'(br_cnt), m_br, "branch count vs model");
    checks++;
    if (m_step < 100 || m_br < 100) begin failures++; $display("FAIL too few random hits"); end
    // reset clears the bins (disable iff)
    rstn = 1'b0;
    @(negedge clk);
    expect_eq(int'(step_cov) + int'(br_cov) + int'(step_cnt) + int'(br_cnt), 0, "cleared by reset");
    $display("hits: step_next=%0d branch=%0d", m_step, m_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
