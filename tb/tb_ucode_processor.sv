// tb_ucode_processor: self-checking test of the microcode processor.
// The processor runs with an inst_sram. Each test loads a program through the
// load port, starts it, feeds the upstream command port with random gaps and
// applies random back-pressure downstream. The instruction-level model
// (ucode_iss_pkg) runs the same program; the processor's SRAM read addresses
// must equal the model's executed-address trace (which checks the branch
// delay slot and the taken/not-taken targets), and its output words must equal
// the model's. Directed tests check the timing: one instruction per cycle,
// busy for N+3 cycles on an N-instruction straight-line program, and a branch
// at SRC showing as reads SRC, SRC+1, then target in consecutive cycles.
module tb_ucode_processor;
  import ucode_pkg::*;
  import ucode_asm_pkg::*;
  import ucode_iss_pkg::*;

  logic clk = 1'b0, rstn = 1'b0;
  logic load_en = 1'b0, start = 1'b0;
  pc_t load_addr = '0, start_pc = '0;
  word_t load_data = '0;
  logic busy;
  logic csn, wen;
  pc_t a;
  word_t d, q;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  word_t in_data = '0, out_data;
  logic stall, br_t, br_nt;

  int checks = 0, failures = 0;
  int n_stall = 0, n_taken = 0, n_not_taken = 0, n_busy_load = 0;
  int in_gap_pct = 0, out_gap_pct = 0;

  pc_t   rd_trace [$];
  int    rd_cycle [$];
  word_t out_got [$];
  word_t in_q [$];
  int    in_idx = 0;
  int    cyc = 0;

  ucode_processor dut (
    .i_clk(clk), .i_rstn(rstn),
    .i_load_en(load_en), .i_load_addr(load_addr), .i_load_data(load_data),
    .i_start(start), .i_start_pc(start_pc), .o_busy(busy),
    .o_inst_mem_csn(csn), .o_inst_mem_wen(wen), .o_inst_mem_a(a), .o_inst_mem_d(d), .i_inst_mem_q(q),
    .i_cmd_valid(in_valid), .i_cmd_data(in_data), .o_cmd_ready(in_ready),
    .o_cmd_valid(out_valid), .o_cmd_data(out_data), .i_cmd_ready(out_ready),
    .o_stall(stall), .o_br_taken(br_t), .o_br_not_taken(br_nt));

  inst_sram #(.AW(IMEM_AW), .DW(XLEN)) u_sram (.i_clk(clk), .i_csn(csn), .i_wen(wen), .i_a(a), .i_d(d), .o_q(q));

  always #5 clk = ~clk;

  // monitors, sampled just before the rising edge
  always @(posedge clk) if (rstn) begin
    cyc++;
    if (busy && !csn && wen) begin rd_trace.push_back(a); rd_cycle.push_back(cyc); end
    if (out_valid && out_ready) out_got.push_back(out_data);
    if (in_valid && in_ready) in_idx++;
    n_stall     += int'(stall);
    n_taken     += int'(br_t);
    n_not_taken += int'(br_nt);
  end
  // downstream output handshake rule: a word offered stays until taken
  logic  prev_hold = 1'b0;
  word_t prev_data = '0;
  always @(posedge clk) begin
    if (rstn && prev_hold) begin
      checks++;
      if (!out_valid || out_data !== prev_data) begin failures++; $display("FAIL output word dropped"); end
    end
    prev_hold <= out_valid && !out_ready;
    prev_data <= out_data;
  end
  // stimulus on the command ports, changed after the edge
  always @(negedge clk) begin
    in_valid  = (in_idx < in_q.size()) && ($urandom_range(0, 99) >= in_gap_pct);
    in_data   = (in_idx < in_q.size()) ? in_q[in_idx] : '0;
    out_ready = ($urandom_range(0, 99) >= out_gap_pct);
  end

  task automatic load_prog(word_t mem [pc_t]);
    foreach (mem[ad]) begin
      @(negedge clk); load_en = 1'b1; load_addr = ad; load_data = mem[ad];
    end
    @(negedge clk); load_en = 1'b0;
  endtask

  task automatic run(pc_t pc0, output int busy_cycles);
    rd_trace.delete(); rd_cycle.delete(); out_got.delete(); in_idx = 0;
    @(negedge clk); start = 1'b1; start_pc = pc0;
    @(negedge clk); start = 1'b0;
    busy_cycles = 0;
    while (busy) begin
      // a load attempt while busy must be ignored
      if ($urandom_range(0, 49) == 0) begin
        load_en = 1'b1; load_addr = rd_trace.size() > 0 ? rd_trace[$] : pc0; load_data = $urandom; n_busy_load++;
      end else load_en = 1'b0;
      busy_cycles++;
      @(negedge clk);
    end
    load_en = 1'b0;
    // let the output register drain
    repeat (20) @(negedge clk);
  endtask

  task automatic compare(ucode_iss iss, string name);
    checks++;
    if (rd_trace.size() != iss.trace.size()) begin
      failures++; $display("FAIL %s: %0d reads, model executed %0d", name, rd_trace.size(), iss.trace.size());
    end else begin
      foreach (rd_trace[i]) if (rd_trace[i] !== iss.trace[i]) begin
        failures++; $display("FAIL %s: read %0d at %h, model %h", name, i, rd_trace[i], iss.trace[i]); break;
      end
    end
    checks++;
    if (out_got.size() != iss.outs.size()) begin
      failures++; $display("FAIL %s: %0d outputs, model %0d", name, out_got.size(), iss.outs.size());
    end else begin
      foreach (out_got[i]) if (out_got[i] !== iss.outs[i]) begin
        failures++; $display("FAIL %s: output %0d %h, model %h", name, i, out_got[i], iss.outs[i]); break;
      end
    end
    checks++;
    if (in_idx != iss.ins_used) begin failures++; $display("FAIL %s: took %0d inputs, model %0d", name, in_idx, iss.ins_used); end
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ucode_iss iss;
    word_t prog [pc_t];
    int bc;
    iss = new();
    repeat (3) @(negedge clk);
    rstn = 1'b1;

    // 1. straight line: one instruction per cycle, busy N+3 cycles
    prog.delete();
    for (int i = 0; i < 10; i++) prog[pc_t'(256 + i)] = a_movi(i + 1, 100 * i + 7);
    prog[16'h010a] = a_r(OP_ADD, 12, 1, 2);     // back-to-back use of results
    prog[16'h010b] = a_r(OP_SUB, 13, 12, 3);
    prog[16'h010c] = a_out(13);
    prog[16'h010d] = a_i(OP_LSR, 14, 13, 1);
    prog[16'h010e] = a_out(14);
    prog[16'h010f] = a_halt();
    load_prog(prog);
    run(16'h0100, bc);
    iss.reset(); iss.mem = prog; iss.run(16'h0100, in_q);
    compare(iss, "straight line");
    expect_eq(bc, 16 + 3, "busy cycles of 16-instruction program");
    expect_eq(int'(out_got.size() == 2 ? out_got[0] : 0), (7 + 107) - 207, "hand-computed r1+r2-r3");
    expect_eq(rd_cycle[$] - rd_cycle[0], 15, "16 reads in 16 consecutive cycles");

    // 2. the listing example: cmp r2,r12 ; bge DST ; nop ; lsr r12,r15,15 ...
    for (int taken = 0; taken < 2; taken++) begin
      pc_t src;
      src = 16'h805f;  // bge
      prog.delete();
      prog[16'h805a] = a_movi(2, (taken != 0) ? 50 : 5);
      prog[16'h805b] = a_movi(12, 20);
      prog[16'h805c] = a_movi(15, 'h8000);
      prog[16'h805d] = a_i(OP_MOVHI, 15, 15, 'hffff);
      prog[16'h805e] = a_cmp(2, 12);
      prog[src]      = a_br(CC_GE, 16'h807e);
      prog[16'h8060] = a_nop();
      prog[16'h8061] = a_i(OP_LSR, 12, 15, 15);
      prog[16'h8062] = a_out(12);
      prog[16'h8063] = a_halt();
      prog[16'h807e] = a_i(OP_ADDI, 11, 12, 1);
      prog[16'h807f] = a_out(11);
      prog[16'h8080] = a_halt();
      load_prog(prog);
      run(16'h805a, bc);
      iss.reset(); iss.mem = prog; iss.run(16'h805a, in_q);
      compare(iss, (taken != 0) ? "listing, taken" : "listing, not taken");
      begin
        int k;
        k = -1;
        foreach (rd_trace[i]) if (rd_trace[i] == src && k < 0) k = i;
        checks++;
        if (k < 0 || rd_trace[k+1] != src + 1 || rd_trace[k+2] != ((taken != 0) ? 16'h807e : src + 2) ||
            rd_cycle[k+2] - rd_cycle[k] != 2) begin
          failures++; $display("FAIL branch address sequence (taken=%0d)", taken);
        end
      end
      expect_eq(int'(out_got[0]), (taken != 0) ? 21 : 32'h1ffff, "listing result");
    end

    // 3. random programs, with and without port gaps
    for (int t = 0; t < 24; t++) begin
      pc_t base;
      base = pc_t'($urandom);
      if (base > 16'hf000) base = 16'h1000;
      prog.delete();
      void'(gen_program(prog, base, 400));
      in_q.delete();
      for (int i = 0; i < 200; i++) in_q.push_back($urandom);
      in_gap_pct  = (t % 3 == 0) ? 0 : 40;
      out_gap_pct = (t % 2 == 0) ? 0 : 60;
      load_prog(prog);
      run(base, bc);
      iss.reset(); iss.mem = prog; iss.run(base, in_q);
      compare(iss, $sformatf("random program %0d", t));
    end
    in_q.delete();

    $display("mechanisms: stall=%0d taken=%0d not_taken=%0d ignored_loads=%0d", n_stall, n_taken, n_not_taken, n_busy_load);
    checks++;
    if (n_stall == 0 || n_taken == 0 || n_not_taken == 0 || n_busy_load == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
