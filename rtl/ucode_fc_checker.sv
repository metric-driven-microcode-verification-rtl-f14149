// ucode_fc_checker: microcode functional-coverage checker for one branch.
//
// One instance watches one conditional branch of the microcode, the
// instruction stored at SRAM word SRC_PC whose taken target is DST_PC. It
// looks only at the instruction SRAM pins: a cycle with i_inst_mem_csn low
// and i_inst_mem_wen high is an instruction read of word i_inst_mem_a.
// Because the processor has one branch delay slot and the SRAM adds one cycle
// of fetch latency, the two outcomes of the branch show up on the bus as three
// reads in consecutive cycles:
//   step next (branch not taken): SRC_PC, SRC_PC+1, SRC_PC+2
//   branch    (branch taken):     SRC_PC, SRC_PC+1, DST_PC
// A two-flop sequence tracker remembers "SRC_PC read last cycle" and
// "SRC_PC then SRC_PC+1 read in the last two cycles"; the third read decides
// which coverage bin is hit. o_*_hit pulses in the cycle of the third read,
// o_*_covered is set on the following edge and stays set (a cover point that
// has fired once), and o_*_count counts hits, saturating at all ones.
// Reset (i_rstn low) disables the check and clears everything, as
// "disable iff (!i_rstn)" does on the equivalent SVA cover property.
//
// The sequences and the pin names are those of the reference checker; it is
// written there as two SVA cover properties. This version is plain
// synthesizable logic so that it can also be kept in silicon or emulation
// and read back as counters; the hit counters are this design's addition.
// If DST_PC equals SRC_PC+2 the two bins cannot be told apart and both fire.
module ucode_fc_checker #(
  parameter int unsigned   AW     = 16,
  parameter logic [AW-1:0] SRC_PC = '0,
  parameter logic [AW-1:0] DST_PC = '0,
  parameter int unsigned   CNT_W  = 16
) (
  input  logic             i_clk,
  input  logic             i_rstn,
  input  logic             i_inst_mem_csn,
  input  logic             i_inst_mem_wen,
  input  logic [AW-1:0]    i_inst_mem_a,
  output logic             o_step_next_hit,
  output logic             o_branch_hit,
  output logic             o_step_next_covered,
  output logic             o_branch_covered,
  output logic [CNT_W-1:0] o_step_next_count,
  output logic [CNT_W-1:0] o_branch_count
);

  localparam logic [AW-1:0] SLOT_PC = AW'(SRC_PC + 1'b1);  // delay slot
  localparam logic [AW-1:0] NEXT_PC = AW'(SRC_PC + 2'd2);  // fall-through

  logic inst_mem_rd;
  logic seen_src;       // SRC_PC was read in the previous cycle
  logic seen_src_slot;  // SRC_PC, SRC_PC+1 were read in the two previous cycles

  assign inst_mem_rd = !i_inst_mem_csn && i_inst_mem_wen;

  assign o_step_next_hit = seen_src_slot && inst_mem_rd && (i_inst_mem_a == NEXT_PC);
  assign o_branch_hit    = seen_src_slot && inst_mem_rd && (i_inst_mem_a == DST_PC);

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      seen_src            <= 1'b0;
      seen_src_slot       <= 1'b0;
      o_step_next_covered <= 1'b0;
      o_branch_covered    <= 1'b0;
      o_step_next_count   <= '0;
      o_branch_count      <= '0;
    end else begin
      seen_src      <= inst_mem_rd && (i_inst_mem_a == SRC_PC);
      seen_src_slot <= seen_src && inst_mem_rd && (i_inst_mem_a == SLOT_PC);
      if (o_step_next_hit) begin
        o_step_next_covered <= 1'b1;
        if (o_step_next_count != '1) o_step_next_count <= o_step_next_count + 1'b1;
      end
      if (o_branch_hit) begin
        o_branch_covered <= 1'b1;
        if (o_branch_count != '1) o_branch_count <= o_branch_count + 1'b1;
      end
    end
  end

endmodule
