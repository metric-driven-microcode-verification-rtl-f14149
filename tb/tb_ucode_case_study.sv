// tb_ucode_case_study: the four-engine IP in the branch configuration of the
// reference case study, whose four binders hold 36, 58, 26 and 82 coverage
// bins, i.e. 18, 29, 13 and 41 branch checkers (202 bins in all). Each engine
// runs bit-test microcode with exactly that many conditional branches (see
// ucode_iss_pkg), placed in its own 4K-word region of its SRAM; the branch
// lists handed to the checkers are computed from the same layout. A stream of
// random commands stands in for the random-seed regression: each command
// steers every branch by one of its bits. The test prints covered/total bins
// per engine and checks every checker's hit counts against the branches the
// instruction-level model took, the output stream against the model, and
// that all 202 bins end up covered.
module tb_ucode_case_study;
  import ucode_pkg::*;
  import ucode_iss_pkg::*;

  localparam int NP = 4, NB = 41;
  localparam logic [NP-1:0][15:0] NBRS = {16'd41, 16'd13, 16'd29, 16'd18};
  localparam int NCMD = 6000;  // one command per random seed of the reference regression

  function automatic pc_t base_of(int e);
    return pc_t'(16'h1000 * (e + 1));
  endfunction
  function automatic logic [NP-1:0][NB-1:0][15:0] branch_list(bit dst);
    logic [NP-1:0][NB-1:0][15:0] l;
    l = '0;
    for (int e = 0; e < NP; e++)
      for (int j = 0; j < int'(NBRS[e]); j++)
        l[e][j] = dst ? bt_dst(base_of(e), j, int'(NBRS[e])) : bt_src(base_of(e), j);
    return l;
  endfunction
  localparam logic [NP-1:0][NB-1:0][15:0] SRCS = branch_list(1'b0);
  localparam logic [NP-1:0][NB-1:0][15:0] DSTS = branch_list(1'b1);

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
  logic [NP-1:0][6:0] nbins;

  int checks = 0, failures = 0;
  word_t in_q [$], out_got [$];
  int in_idx = 0;

  ucode_ip_top #(.NPROC(NP), .NUM_BR(NB), .NUM_BRS(NBRS), .SRC_PCS(SRCS), .DST_PCS(DSTS)) dut (
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

  always @(posedge clk) if (rstn) begin
    if (out_valid && out_ready) out_got.push_back(out_data);
    if (in_valid && in_ready) in_idx++;
  end
  always @(negedge clk) begin
    in_valid  = (in_idx < in_q.size()) && ($urandom_range(0, 99) >= 10);
    in_data   = (in_idx < in_q.size()) ? in_q[in_idx] : '0;
    out_ready = ($urandom_range(0, 99) >= 10);
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog [NP][pc_t];
    word_t stream [$];
    ucode_iss iss;
    int total_cov, total_bins;
    for (int e = 0; e < NP; e++) start_pc[e] = base_of(e);
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    for (int e = 0; e < NP; e++) begin
      bit_test_program(prog[e], base_of(e), int'(NBRS[e]));
      foreach (prog[e][ad]) begin
        @(negedge clk); load_en = 1'b1; load_sel = 2'(e); load_addr = ad; load_data = prog[e][ad];
      end
    end
    @(negedge clk); load_en = 1'b0; start = '1;
    @(negedge clk); start = '0;
    for (int i = 0; i < NCMD; i++) begin
      word_t x;
      x = $urandom;
      if (x == 0) x = 1;
      in_q.push_back(x);
    end
    in_q.push_back(0);
    while (busy != '0) @(negedge clk);
    repeat (20) @(negedge clk);

    iss = new();
    stream = in_q;
    total_cov = 0; total_bins = 0;
    for (int e = 0; e < NP; e++) begin
      int nb;
      nb = int'(NBRS[e]);
      iss.reset(); iss.mem = prog[e]; iss.run(base_of(e), stream);
      stream = iss.outs;
      for (int j = 0; j < nb; j++) begin
        int es, eb;
        es = 0; eb = 0;
        foreach (iss.branches[i]) if (iss.branches[i].src == SRCS[e][j]) begin
          if (iss.branches[i].taken) eb++; else es++;
        end
        expect_eq(int'(s_cnt[e][j]), es, $sformatf("engine %0d checker %0d step_next count", e, j));
        expect_eq(int'(b_cnt[e][j]), eb, $sformatf("engine %0d checker %0d branch count", e, j));
      end
      for (int j = nb; j < NB; j++) expect_eq(int'(s_cov[e][j]) + int'(b_cov[e][j]), 0, "unused checker slot");
      $display("uCode%0d_Checker: %0d / %0d bins covered", e, nbins[e], 2 * nb);
      expect_eq(int'(nbins[e]), 2 * nb, $sformatf("engine %0d fully covered", e));
      total_cov += int'(nbins[e]);
      total_bins += 2 * nb;
    end
    $display("all engines: %0d / %0d bins covered", total_cov, total_bins);
    expect_eq(total_bins, 202, "202 bins in the case-study configuration");
    checks++;
    if (out_got != stream) begin failures++; $display("FAIL chain output differs from model"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
