// tb_ucode_ip_top: end-to-end test of the four-engine chain at its default
// parameters. Every engine gets its own variant of the command-loop
// microcode (constant k = engine + 1) through the shared load port and is
// started. A stream of random commands, with random gaps upstream and random
// back-pressure downstream, passes through all four engines and ends with a
// zero that halts them one after the other. The expected output stream is
// made by running the instruction-level model of each engine on the output of
// the previous one; the expected coverage bins and hit counts of every
// engine's checkers come from the branches the model took.
// Mechanisms counted (each must occur): taken and not-taken branches,
// pipeline stalls, back-pressure at the chain output, a full set of covered
// bins in every engine, and every engine halting.
module tb_ucode_ip_top;
  import ucode_pkg::*;
  import ucode_iss_pkg::*;

  localparam int NP = 4, NB = 2;
  localparam int NCMD = 400;

  logic clk = 1'b0, rstn = 1'b0;
  logic load_en = 1'b0;
  logic [1:0] load_sel = '0;
  pc_t load_addr = '0;
  word_t load_data = '0;
  logic [NP-1:0] start = '0, busy;
  pc_t [NP-1:0] start_pc;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  word_t in_data = '0, out_data;
  logic [NP-1:0] stall, br_t, br_nt;
  logic [NP-1:0][NB-1:0] s_hit, b_hit, s_cov, b_cov;
  logic [NP-1:0][NB-1:0][15:0] s_cnt, b_cnt;
  logic [NP-1:0][2:0] nbins;

  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_stall = 0, n_backpressure = 0, n_halted = 0;
  word_t in_q [$], out_got [$];
  int in_idx = 0;

  ucode_ip_top dut (
    .i_clk(clk), .i_rstn(rstn),
    .i_load_en(load_en), .i_load_sel(load_sel), .i_load_addr(load_addr), .i_load_data(load_data),
    .i_start(start), .i_start_pc(start_pc), .o_busy(busy),
    .i_cmd_valid(in_valid), .i_cmd_data(in_data), .o_cmd_ready(in_ready),
    .o_cmd_valid(out_valid), .o_cmd_data(out_data), .i_cmd_ready(out_ready),
    .o_stall(stall), .o_br_taken(br_t), .o_br_not_taken(br_nt),
    .o_step_next_hit(s_hit), .o_branch_hit(b_hit),
    .o_step_next_covered(s_cov), .o_branch_covered(b_cov),
    .o_step_next_count(s_cnt), .o_branch_count(b_cnt), .o_covered_bins(nbins));

  always #5 clk = ~clk;

  logic [NP-1:0] busy_q = '0;
  always @(posedge clk) if (rstn) begin
    if (out_valid && out_ready) out_got.push_back(out_data);
    if (in_valid && in_ready) in_idx++;
    n_taken        += $countones(br_t);
    n_not_taken    += $countones(br_nt);
    n_stall        += $countones(stall);
    n_backpressure += int'(out_valid && !out_ready);
    n_halted       += $countones(busy_q & ~busy);
    busy_q         <= busy;
  end
  always @(negedge clk) begin
    in_valid  = (in_idx < in_q.size()) && ($urandom_range(0, 99) >= 20);
    in_data   = (in_idx < in_q.size()) ? in_q[in_idx] : '0;
    out_ready = ($urandom_range(0, 99) >= 30);
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog [NP][pc_t];
    word_t stream [$];
    ucode_iss iss;
    int cyc0;
    for (int e = 0; e < NP; e++) start_pc[e] = CMD_LOOP_START;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    // load the four microcode images
    for (int e = 0; e < NP; e++) begin
      cmd_loop_program(prog[e], e + 1);
      foreach (prog[e][ad]) begin
        @(negedge clk); load_en = 1'b1; load_sel = 2'(e); load_addr = ad; load_data = prog[e][ad];
      end
    end
    @(negedge clk); load_en = 1'b0; start = '1;
    @(negedge clk); start = '0;
    expect_eq(int'(busy), 15, "all engines running");
    // command stream
    for (int i = 0; i < NCMD; i++) in_q.push_back($urandom_range(1, 200));
    in_q.push_back(0);
    cyc0 = 0;
    while (busy != '0) begin @(negedge clk); cyc0++; end
    repeat (20) @(negedge clk);
    $display("chain finished %0d commands in %0d cycles", NCMD, cyc0);

    // reference: run the model of each engine on the previous one's output
    iss = new();
    stream = in_q;
    for (int e = 0; e < NP; e++) begin
      int es [NB], eb [NB];
      iss.reset(); iss.mem = prog[e]; iss.run(CMD_LOOP_START, stream);
      stream = iss.outs;
      es = '{0, 0}; eb = '{0, 0};
      foreach (iss.branches[i]) begin
        int j;
        j = (iss.branches[i].src == 16'h807f) ? 0 : (iss.branches[i].src == 16'h8082) ? 1 : -1;
        if (j >= 0) begin
          if (iss.branches[i].taken) eb[j]++; else es[j]++;
        end
      end
      for (int j = 0; j < NB; j++) begin
        expect_eq(int'(s_cnt[e][j]), es[j], $sformatf("engine %0d step_next count %0d", e, j));
        expect_eq(int'(b_cnt[e][j]), eb[j], $sformatf("engine %0d branch count %0d", e, j));
        expect_eq(int'(s_cov[e][j]), int'(es[j] > 0), $sformatf("engine %0d step_next bin %0d", e, j));
        expect_eq(int'(b_cov[e][j]), int'(eb[j] > 0), $sformatf("engine %0d branch bin %0d", e, j));
      end
      expect_eq(int'(nbins[e]), 4, $sformatf("engine %0d covered bins of 4", e));
    end
    expect_eq(out_got.size(), stream.size(), "output count");
    checks++;
    if (out_got != stream) begin failures++; $display("FAIL chain output differs from model"); end
    expect_eq(out_got.size() > 0 ? int'(out_got[$]) : -1, 0, "zero passed to the end");

    $display("mechanisms: taken=%0d not_taken=%0d stall=%0d backpressure=%0d halted=%0d",
             n_taken, n_not_taken, n_stall, n_backpressure, n_halted);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_stall == 0 || n_backpressure == 0 || n_halted != NP) begin
      failures++; $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
