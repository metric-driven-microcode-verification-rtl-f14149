// tb_ucode_engine: self-checking test of one engine (processor, SRAM, binder)
// with its default branch list. The engine runs the command-loop microcode
// (see ucode_iss_pkg), whose two sorting branches sit on the default checker
// addresses. Three directed commands take the branches one way at a time and
// the coverage bins are checked after each; then random commands with random
// port gaps follow, and outputs, bins and hit counts are compared with the
// instruction-level model.
module tb_ucode_engine;
  import ucode_pkg::*;
  import ucode_iss_pkg::*;

  logic clk = 1'b0, rstn = 1'b0;
  logic load_en = 1'b0, start = 1'b0;
  pc_t load_addr = '0;
  word_t load_data = '0;
  logic busy, in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  word_t in_data = '0, out_data;
  logic stall, br_t, br_nt;
  logic [1:0] s_hit, b_hit, s_cov, b_cov;
  logic [1:0][15:0] s_cnt, b_cnt;
  logic [2:0] nbins;
  int checks = 0, failures = 0;
  word_t in_q [$], out_got [$];
  int in_idx = 0, gap = 0;

  ucode_engine dut (
    .i_clk(clk), .i_rstn(rstn), .i_load_en(load_en), .i_load_addr(load_addr), .i_load_data(load_data),
    .i_start(start), .i_start_pc(CMD_LOOP_START), .o_busy(busy),
    .i_cmd_valid(in_valid), .i_cmd_data(in_data), .o_cmd_ready(in_ready),
    .o_cmd_valid(out_valid), .o_cmd_data(out_data), .i_cmd_ready(out_ready),
    .o_stall(stall), .o_br_taken(br_t), .o_br_not_taken(br_nt),
    .o_step_next_hit(s_hit), .o_branch_hit(b_hit), .o_step_next_covered(s_cov), .o_branch_covered(b_cov),
    .o_step_next_count(s_cnt), .o_branch_count(b_cnt), .o_covered_bins(nbins));

  always #5 clk = ~clk;

  always @(posedge clk) if (rstn) begin
    if (out_valid && out_ready) out_got.push_back(out_data);
    if (in_valid && in_ready) in_idx++;
  end
  always @(negedge clk) begin
    in_valid  = (in_idx < in_q.size()) && ($urandom_range(0, 99) >= gap);
    in_data   = (in_idx < in_q.size()) ? in_q[in_idx] : '0;
    out_ready = ($urandom_range(0, 99) >= gap);
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask
  task automatic send_and_wait(word_t x);
    int n0 = out_got.size();
    in_q.push_back(x);
    while (out_got.size() == n0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog [pc_t];
    ucode_iss iss;
    int exp_s [2], exp_b [2];
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    cmd_loop_program(prog, 3);
    foreach (prog[ad]) begin
      @(negedge clk); load_en = 1'b1; load_addr = ad; load_data = prog[ad];
    end
    @(negedge clk); load_en = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (10) @(negedge clk);
    expect_eq(int'(nbins), 0, "no bin before the first command");
    send_and_wait(150);
    expect_eq(int'(out_got[$]), 147, "150 -> 150-3");
    expect_eq(int'({s_cov, b_cov}), 1, "only branch 0 taken");
    send_and_wait(10);
    expect_eq(int'(out_got[$]), 23, "10 -> 2*10+3");
    expect_eq(int'({s_cov, b_cov}), 7, "branch 0 stepped, branch 1 taken");
    send_and_wait(70);
    expect_eq(int'(out_got[$]), 71, "70 -> 71");
    expect_eq(int'(nbins), 4, "all four bins");
    gap = 30;
    for (int i = 0; i < 300; i++) in_q.push_back($urandom_range(1, 200));
    in_q.push_back(0);
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    iss = new();
    iss.reset(); iss.mem = prog; iss.run(CMD_LOOP_START, in_q);
    checks++;
    if (out_got != iss.outs) begin failures++; $display("FAIL outputs differ from model (%0d/%0d)", out_got.size(), iss.outs.size()); end
    exp_s = '{0, 0}; exp_b = '{0, 0};
    foreach (iss.branches[i]) begin
      int j;
      j = (iss.branches[i].src == 16'h807f) ? 0 : (iss.branches[i].src == 16'h8082) ? 1 : -1;
      if (j >= 0) begin
        if (iss.branches[i].taken) exp_b[j]++; else exp_s[j]++;
      end
    end
    for (int j = 0; j < 2; j++) begin
      expect_eq(int'(s_cnt[j]), exp_s[j], $sformatf("step_next count %0d", j));
      expect_eq(int'(b_cnt[j]), exp_b[j], $sformatf("branch count %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
