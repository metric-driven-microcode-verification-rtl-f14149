// ucode_processor: programmable microcode processor with a branch delay slot.
//
// A four-stage pipeline, fetch -> decode -> execute -> write-back, runs the
// microcode stored in an external instruction SRAM (inst_sram).
//   Fetch      drives the SRAM pins with the program counter (csn low, wen
//              high); the SRAM returns the word one cycle later.
//   Decode     takes the instruction from the SRAM output. Branches are
//              resolved here: the condition is the result of the latest cmp,
//              taken straight from the execute stage when the cmp is there in
//              the same cycle. A taken branch loads its target into the PC.
//              The instruction behind the branch is already being fetched and
//              is always executed: one branch delay slot, no stall, no flush.
//              On the SRAM bus a branch at SRC_PC is therefore followed by
//              reads of SRC_PC+1 and then the target (taken) or SRC_PC+2.
//   Execute    reads r0..r15 (forwarded from write-back), runs the ALU, the
//              compare, and the command-port transfers.
//   Write-back writes the register file.
// Instructions: see ucode_pkg. "in" takes the next word from the upstream
// command port (valid/ready) and "out" hands a word to the downstream port
// through a one-word output register; either stalls the pipeline (fetch,
// decode and execute hold, the SRAM is not read, a bubble enters write-back)
// until the port can move. "halt" stops fetching; the processor is idle
// (o_busy low) once the pipeline has drained.
//
// Control: while idle, words on the load port are written to the SRAM
// (i_load_en, i_load_addr, i_load_data, one word per cycle); i_start starts
// fetching at i_start_pc. Loads while busy are ignored. o_stall, o_br_taken
// and o_br_not_taken are status strobes (one cycle each) for monitoring.
// Reset (i_rstn, asynchronous, active low) clears the pipeline, the flags
// and the registers.
//
// From the reference design: the four stages, the single delay slot, the
// one-cycle SRAM fetch, the csn/wen/address pins, cmp followed by a
// conditional branch, and the r0..r15 register names. The encoding, the rest
// of the instruction set, the command ports of the processor chain and the
// load/start control are this design's own choices.
module ucode_processor
  import ucode_pkg::*;
(
  input  logic   i_clk,
  input  logic   i_rstn,
  // microcode load and start, used while idle
  input  logic   i_load_en,
  input  pc_t    i_load_addr,
  input  word_t  i_load_data,
  input  logic   i_start,
  input  pc_t    i_start_pc,
  output logic   o_busy,
  // instruction SRAM
  output logic   o_inst_mem_csn,
  output logic   o_inst_mem_wen,
  output pc_t    o_inst_mem_a,
  output word_t  o_inst_mem_d,
  input  word_t  i_inst_mem_q,
  // upstream command port
  input  logic   i_cmd_valid,
  input  word_t  i_cmd_data,
  output logic   o_cmd_ready,
  // downstream command port
  output logic   o_cmd_valid,
  output word_t  o_cmd_data,
  input  logic   i_cmd_ready,
  // status strobes
  output logic   o_stall,
  output logic   o_br_taken,
  output logic   o_br_not_taken
);

  // ---------------- state ----------------
  logic   running;
  pc_t    pc;
  logic   d_valid;
  logic   e_valid;
  instr_t e_ins;
  logic   w_valid;
  logic   w_we;
  ridx_t  w_rd;
  word_t  w_data;
  flags_t flags_q;
  word_t  regs [NREGS];

  // ---------------- decode ----------------
  instr_t d_ins;
  logic   d_is_br, d_halt, d_take;
  flags_t cur_flags;

  // ---------------- execute ----------------
  word_t  e_a, e_b, e_res;
  logic   e_we;
  logic   e_is_cmp, e_in_wait, e_out_wait;
  logic   stall, fetch_en, load_sel;

  assign d_ins  = instr_t'(i_inst_mem_q);
  assign d_is_br = d_valid && (d_ins.op == OP_BR);
  assign d_halt  = d_valid && (d_ins.op == OP_HALT);

  // operands, forwarded from write-back
  assign e_a = (w_valid && w_we && (w_rd == e_ins.rs)) ? w_data : regs[e_ins.rs];
  assign e_b = (w_valid && w_we && (w_rd == e_ins.rt)) ? w_data : regs[e_ins.rt];

  assign e_is_cmp  = e_valid && (e_ins.op == OP_CMP);
  assign cur_flags = e_is_cmp ? compare(e_a, e_b) : flags_q;
  assign d_take    = d_is_br && cond_true(d_ins.rd, cur_flags);

  assign e_in_wait  = e_valid && (e_ins.op == OP_IN)  && !i_cmd_valid;
  assign e_out_wait = e_valid && (e_ins.op == OP_OUT) && o_cmd_valid && !i_cmd_ready;
  assign stall      = e_in_wait || e_out_wait;

  assign fetch_en = running && !stall && !d_halt;
  assign o_busy   = running || d_valid || e_valid || w_valid;
  assign load_sel = i_load_en && !o_busy;

  // SRAM pins: fetch while running, microcode load while idle
  assign o_inst_mem_csn = !(fetch_en || load_sel);
  assign o_inst_mem_wen = !load_sel;
  assign o_inst_mem_a   = load_sel ? i_load_addr : pc;
  assign o_inst_mem_d   = i_load_data;

  assign o_cmd_ready    = e_valid && (e_ins.op == OP_IN);
  assign o_stall        = stall;
  assign o_br_taken     = d_take && !stall;
  assign o_br_not_taken = d_is_br && !d_take && !stall;

  always_comb begin
    e_res = '0;
    e_we  = 1'b0;
    unique case (e_ins.op)
      OP_ADD:   begin e_res = e_a + e_b;                               e_we = 1'b1; end
      OP_ADDI:  begin e_res = e_a + word_t'($signed(e_ins.imm));       e_we = 1'b1; end
      OP_SUB:   begin e_res = e_a - e_b;                               e_we = 1'b1; end
      OP_AND:   begin e_res = e_a & e_b;                               e_we = 1'b1; end
      OP_OR:    begin e_res = e_a | e_b;                               e_we = 1'b1; end
      OP_XOR:   begin e_res = e_a ^ e_b;                               e_we = 1'b1; end
      OP_LSR:   begin e_res = e_a >> e_ins.imm[4:0];                   e_we = 1'b1; end
      OP_LSL:   begin e_res = e_a << e_ins.imm[4:0];                   e_we = 1'b1; end
      OP_MOVI:  begin e_res = word_t'(e_ins.imm);                      e_we = 1'b1; end
      OP_MOVHI: begin e_res = {e_ins.imm, e_a[15:0]};                  e_we = 1'b1; end
      OP_IN:    begin e_res = i_cmd_data;                              e_we = 1'b1; end
      default:  begin e_res = '0;                                      e_we = 1'b0; end
    endcase
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      running     <= 1'b0;
      pc          <= '0;
      d_valid     <= 1'b0;
      e_valid     <= 1'b0;
      e_ins       <= '0;
      w_valid     <= 1'b0;
      w_we        <= 1'b0;
      w_rd        <= '0;
      w_data      <= '0;
      flags_q     <= '0;
      o_cmd_valid <= 1'b0;
      o_cmd_data  <= '0;
    end else begin
      // start / halt
      if (!o_busy && i_start) begin
        running <= 1'b1;
        pc      <= i_start_pc;
      end else if (d_halt && !stall) begin
        running <= 1'b0;
      end

      // fetch -> decode
      if (fetch_en) pc <= d_take ? d_ins.imm : pc + 1'b1;
      if (!stall) begin
        d_valid <= fetch_en;
        // decode -> execute
        e_valid <= d_valid;
        e_ins   <= d_ins;
        // execute -> write-back
        w_valid <= e_valid;
        w_we    <= e_valid && e_we;
        w_rd    <= e_ins.rd;
        w_data  <= e_res;
        if (e_is_cmp) flags_q <= cur_flags;
      end else begin
        w_valid <= 1'b0;
        w_we    <= 1'b0;
      end

      // downstream output register
      if (e_valid && (e_ins.op == OP_OUT) && !e_out_wait) begin
        o_cmd_valid <= 1'b1;
        o_cmd_data  <= e_a;
      end else if (i_cmd_ready) begin
        o_cmd_valid <= 1'b0;
      end
    end
  end

  // register file, written in write-back
  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (w_valid && w_we) begin
      regs[w_rd] <= w_data;
    end
  end

  // the SRAM is never asked to read and write in the same cycle
  always_ff @(posedge i_clk) begin
    assert (!(fetch_en && load_sel)) else $error("fetch and load collide");
  end

endmodule
