// tb_ucode_binder: self-checking test of the checker binder.
// Three branches, one of which has its target right after its delay slot
// (so both of its bins fire on the same reads). The bus is driven with
// complete and broken sequences; after each step the sticky bins and the
// covered-bin total are compared with a model that lists which bins have
// been completed so far.
module tb_ucode_binder;
  localparam int AW = 16, NB = 3;
  localparam logic [NB-1:0][AW-1:0] SRCS = {16'h0300, 16'h8082, 16'h807f};
  localparam logic [NB-1:0][AW-1:0] DSTS = {16'h0302, 16'h8087, 16'h808e};

  logic clk = 1'b0, rstn = 1'b0, csn = 1'b1, wen = 1'b1;
  logic [AW-1:0] a = '0;
  logic [NB-1:0] s_hit, b_hit, s_cov, b_cov;
  logic [NB-1:0][15:0] s_cnt, b_cnt;
  logic [$clog2(2*NB+1)-1:0] nbins;
  logic [NB-1:0] m_s = '0, m_b = '0;
  int checks = 0, failures = 0;

  ucode_binder #(.AW(AW), .NUM_BR(NB), .SRC_PCS(SRCS), .DST_PCS(DSTS)) dut (
    .i_clk(clk), .i_rstn(rstn), .i_inst_mem_csn(csn), .i_inst_mem_wen(wen), .i_inst_mem_a(a),
    .o_step_next_hit(s_hit), .o_branch_hit(b_hit), .o_step_next_covered(s_cov), .o_branch_covered(b_cov),
    .o_step_next_count(s_cnt), .o_branch_count(b_cnt), .o_covered_bins(nbins));

  always #5 clk = ~clk;

  task automatic rd(logic [AW-1:0] ad);
    @(negedge clk); csn = 1'b0; wen = 1'b1; a = ad;
  endtask
  task automatic idle();
    @(negedge clk); csn = 1'b1; a = '0;
  endtask
  task automatic check(string what);
    @(negedge clk); csn = 1'b1;
    checks++;
    if (s_cov !== m_s || b_cov !== m_b || nbins != $countones({m_s, m_b})) begin
      failures++;
      $display("FAIL %s: step %b/%b branch %b/%b bins %0d/%0d", what, s_cov, m_s, b_cov, m_b, nbins, $countones({m_s, m_b}));
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    check("after reset");
    // branch 0 taken
    rd(16'h807f); rd(16'h8080); rd(16'h808e); idle(); m_b[0] = 1'b1; check("branch 0 taken");
    // branch 0 not taken, which runs straight into branch 1 (taken)
    rd(16'h807f); rd(16'h8080); rd(16'h8081); rd(16'h8082); rd(16'h8083); rd(16'h8087); idle();
    m_s[0] = 1'b1; m_b[1] = 1'b1; check("branch 0 step, branch 1 taken");
    // broken sequences change nothing
    rd(16'h8082); idle(); rd(16'h8083); rd(16'h8084); idle(); check("broken by idle");
    rd(16'h8082); rd(16'h8084); rd(16'h8085); idle(); check("skipped delay slot");
    // branch 2: target equals the fall-through, both bins fire at once
    rd(16'h0300); rd(16'h0301); rd(16'h0302); idle(); m_s[2] = 1'b1; m_b[2] = 1'b1; check("branch 2");
    // branch 1 not taken completes the set
    rd(16'h8082); rd(16'h8083); rd(16'h8084); idle(); m_s[1] = 1'b1; check("all bins");
    checks++;
    if (s_cnt[0] != 1 || b_cnt[0] != 1 || b_cnt[1] != 1 || s_cnt[1] != 1 || s_cnt[2] != 1 || b_cnt[2] != 1) begin
      failures++; $display("FAIL hit counts");
    end
    rstn = 1'b0; m_s = '0; m_b = '0; check("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
