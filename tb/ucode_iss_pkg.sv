// ucode_iss_pkg: instruction-level reference model and program generator.
//
// ucode_iss executes microcode one instruction at a time, with the branch
// delay slot written out explicitly (a taken branch first executes the next
// instruction, then continues at the target). It records the order in which
// instruction words are executed, every conditional branch it meets (source,
// target, taken or not) and the words sent by "out". The testbenches compare
// the processor's SRAM read addresses and output words with these records.
// ucode_prog_gen writes random, always-terminating programs: forward branches
// only, never a branch or halt in a delay slot, and a final halt.
package ucode_iss_pkg;
  import ucode_pkg::*;
  import ucode_asm_pkg::*;

  typedef struct {
    pc_t  src;
    pc_t  dst;
    logic taken;
    logic uncond;
  } br_event_t;

  class ucode_iss;
    word_t     mem [pc_t];
    word_t     regs [NREGS];
    flags_t    flags;
    pc_t       trace [$];
    br_event_t branches [$];
    word_t     outs [$];
    int        ins_used;

    function void reset();
      foreach (regs[i]) regs[i] = '0;
      flags = '0;
      trace.delete(); branches.delete(); outs.delete();
      ins_used = 0;
    endfunction

    function word_t fetch(pc_t pc);
      return mem.exists(pc) ? mem[pc] : '0;
    endfunction

    // Runs from start_pc until halt; ins supplies the "in" words in order.
    function void run(pc_t start_pc, word_t ins [$], int max_steps = 50000000);
      pc_t pc = start_pc;
      logic pending = 1'b0;  // a taken branch is waiting for its delay slot
      pc_t  target = '0;
      for (int step = 0; step < max_steps; step++) begin
        instr_t i;
        pc_t next;
        i = instr_t'(fetch(pc));
        trace.push_back(pc);
        next = pc + 1'b1;
        case (i.op)
          OP_ADD:   regs[i.rd] = regs[i.rs] + regs[i.rt];
          OP_ADDI:  regs[i.rd] = regs[i.rs] + {{16{i.imm[15]}}, i.imm};
          OP_SUB:   regs[i.rd] = regs[i.rs] - regs[i.rt];
          OP_AND:   regs[i.rd] = regs[i.rs] & regs[i.rt];
          OP_OR:    regs[i.rd] = regs[i.rs] | regs[i.rt];
          OP_XOR:   regs[i.rd] = regs[i.rs] ^ regs[i.rt];
          OP_LSR:   regs[i.rd] = regs[i.rs] >> i.imm[4:0];
          OP_LSL:   regs[i.rd] = regs[i.rs] << i.imm[4:0];
          OP_MOVI:  regs[i.rd] = {16'h0, i.imm};
          OP_MOVHI: regs[i.rd] = {i.imm, regs[i.rs][15:0]};
          OP_CMP: begin
            flags.eq  = regs[i.rs] == regs[i.rt];
            flags.lt  = $signed(regs[i.rs]) < $signed(regs[i.rt]);
            flags.ltu = regs[i.rs] < regs[i.rt];
          end
          OP_BR: begin
            logic t;
            case (i.rd)
              CC_AL:  t = 1'b1;
              CC_EQ:  t = flags.eq;
              CC_NE:  t = !flags.eq;
              CC_LT:  t = flags.lt;
              CC_GE:  t = !flags.lt;
              CC_LTU: t = flags.ltu;
              CC_GEU: t = !flags.ltu;
              default: t = 1'b0;
            endcase
            branches.push_back('{src: pc, dst: i.imm, taken: t, uncond: (i.rd == CC_AL)});
            if (t) begin pending = 1'b1; target = i.imm; end
          end
          OP_IN: begin
            regs[i.rd] = (ins_used < ins.size()) ? ins[ins_used] : '0;
            ins_used++;
          end
          OP_OUT:  outs.push_back(regs[i.rs]);
          OP_HALT: return;
          default: ;
        endcase
        if (i.op != OP_BR && pending) begin
          next = target;
          pending = 1'b0;
        end
        pc = next;
      end
      $display("ISS: step limit reached");
    endfunction
  endclass

  // Random program of about len words at base; returns the word count.
  function automatic int gen_program(ref word_t mem [pc_t], input pc_t base, input int len,
                                     input int in_pct = 5);
    int n = 0;
    // seed registers
    for (int r = 1; r < NREGS; r++) begin
      mem[base + pc_t'(n)] = a_movi(r, $urandom); n++;
      if ($urandom_range(0, 1) != 0) begin mem[base + pc_t'(n)] = a_i(OP_MOVHI, r, r, $urandom); n++; end
    end
    while (n < len) begin
      int k = $urandom_range(0, 99);
      if (k < 12 && n + 10 < len) begin
        // cmp ; branch forward ; delay slot
        int hop = $urandom_range(2, 8);
        mem[base + pc_t'(n)] = a_cmp($urandom_range(0, 15), $urandom_range(0, 15)); n++;
        mem[base + pc_t'(n)] = a_br(cond_e'($urandom_range(0, 7)), pc_t'(int'(base) + n + hop)); n++;
        mem[base + pc_t'(n)] = a_i(OP_ADDI, $urandom_range(1, 15), $urandom_range(0, 15), $urandom); n++;
      end else if (k < 20) begin
        mem[base + pc_t'(n)] = a_out($urandom_range(0, 15)); n++;
      end else if (k < 20 + in_pct) begin
        mem[base + pc_t'(n)] = a_in($urandom_range(1, 15)); n++;
      end else if (k < 24 + in_pct) begin
        mem[base + pc_t'(n)] = a_nop(); n++;
      end else begin
        opcode_e op;
        int sel = $urandom_range(0, 9);
        op = (sel == 0) ? OP_ADD : (sel == 1) ? OP_ADDI : (sel == 2) ? OP_SUB : (sel == 3) ? OP_AND :
             (sel == 4) ? OP_OR : (sel == 5) ? OP_XOR : (sel == 6) ? OP_LSR : (sel == 7) ? OP_LSL :
             (sel == 8) ? OP_MOVI : OP_MOVHI;
        mem[base + pc_t'(n)] = {op, 4'($urandom_range(1, 15)), 4'($urandom_range(0, 15)),
                                4'($urandom_range(0, 15)), 16'($urandom)};
        n++;
      end
    end
    // landing pad for the last branches, then halt
    for (int j = 0; j < 9; j++) begin mem[base + pc_t'(n)] = a_out(j + 1); n++; end
    mem[base + pc_t'(n)] = a_halt(); n++;
    return n;
  endfunction

  // Command-loop microcode used by the engine and top-level tests. It reads
  // commands from the upstream port until a zero arrives, which it passes on
  // before halting. Each command x is sorted by two cmp/branch pairs placed
  // on the default checker list (branch at 'h807f to 'h808e, at 'h8082 to
  // 'h8087):  x >= 100 -> x - k,  x < 50 -> 2x + k,  otherwise x + 1.
  // k (1..15) makes the microcode of each engine in a chain different.
  function automatic void cmd_loop_program(ref word_t mem [pc_t], input int k);
    mem[16'h8076] = a_movi(6, k);
    mem[16'h8077] = a_movi(3, 50);
    mem[16'h8078] = a_movi(2, 100);
    mem[16'h8079] = a_movi(5, 0);
    mem[16'h807a] = a_nop();
    mem[16'h807b] = a_in(1);                      // loop: next command
    mem[16'h807c] = a_cmp(1, 5);
    mem[16'h807d] = a_br(CC_EQ, 16'h80a0);        // zero: leave the loop
    mem[16'h807e] = a_cmp(1, 2);                  // (delay slot)
    mem[16'h807f] = a_br(CC_GE, 16'h808e);        // x >= 100
    mem[16'h8080] = a_nop();                      // (delay slot)
    mem[16'h8081] = a_cmp(1, 3);
    mem[16'h8082] = a_br(CC_LTU, 16'h8087);       // x < 50
    mem[16'h8083] = a_i(OP_ADDI, 4, 1, 1);        // (delay slot) x + 1
    mem[16'h8084] = a_out(4);
    mem[16'h8085] = a_br(CC_AL, 16'h807b);
    mem[16'h8086] = a_nop();
    mem[16'h8087] = a_i(OP_LSL, 4, 1, 1);         // 2x
    mem[16'h8088] = a_r(OP_ADD, 4, 4, 6);         // 2x + k
    mem[16'h8089] = a_br(CC_AL, 16'h807b);
    mem[16'h808a] = a_out(4);                     // (delay slot)
    mem[16'h808e] = a_r(OP_SUB, 4, 1, 6);         // x - k
    mem[16'h808f] = a_out(4);
    mem[16'h8090] = a_br(CC_AL, 16'h807b);
    mem[16'h8091] = a_nop();
    mem[16'h80a0] = a_out(1);                     // pass the zero on
    mem[16'h80a1] = a_halt();
  endfunction

  localparam pc_t CMD_LOOP_START = 16'h8076;

  // Bit-test microcode with nbr conditional branches, for the case-study
  // configuration. Loop: read a command x (zero ends the loop, passes the
  // zero on and halts); then nbr-1 units each test one bit of x and branch
  // over a counter increment when the bit is set; finally x is passed on
  // unchanged. Unit j occupies 8 words from u = base+6+8j; its branch is at
  // u+3 with target u+8. The loop-exit branch at base+4 is branch 0.
  function automatic pc_t bt_src(pc_t base, int j);
    return (j == 0) ? base + 16'd4 : base + pc_t'(6 + 8 * (j - 1) + 3);
  endfunction
  function automatic pc_t bt_dst(pc_t base, int j, int nbr);
    return (j == 0) ? base + pc_t'(6 + 8 * (nbr - 1) + 3) : base + pc_t'(6 + 8 * (j - 1) + 8);
  endfunction
  function automatic void bit_test_program(ref word_t mem [pc_t], input pc_t base, input int nbr);
    pc_t u, e;
    mem[base + 16'd0] = a_movi(7, 1);
    mem[base + 16'd1] = a_movi(8, 0);
    mem[base + 16'd2] = a_in(1);                          // loop head
    mem[base + 16'd3] = a_cmp(1, 8);
    mem[base + 16'd4] = a_br(CC_EQ, bt_dst(base, 0, nbr)); // zero: exit
    mem[base + 16'd5] = a_movi(2, 0);                     // (delay slot)
    for (int j = 1; j < nbr; j++) begin
      u = base + pc_t'(6 + 8 * (j - 1));
      mem[u + 16'd0] = a_i(OP_LSR, 4, 1, (j - 1) % 32);
      mem[u + 16'd1] = a_r(OP_AND, 4, 4, 7);
      mem[u + 16'd2] = a_cmp(4, 8);
      mem[u + 16'd3] = a_br(CC_NE, u + 16'd8);            // bit set: skip
      mem[u + 16'd4] = a_nop();                           // (delay slot)
      mem[u + 16'd5] = a_i(OP_ADDI, 2, 2, 1);             // count clear bits
      mem[u + 16'd6] = a_nop();
      mem[u + 16'd7] = a_nop();
    end
    e = base + pc_t'(6 + 8 * (nbr - 1));
    mem[e + 16'd0] = a_out(1);
    mem[e + 16'd1] = a_br(CC_AL, base + 16'd2);
    mem[e + 16'd2] = a_nop();                             // (delay slot)
    mem[e + 16'd3] = a_out(1);                            // exit: pass the zero on
    mem[e + 16'd4] = a_halt();
  endfunction
endpackage
