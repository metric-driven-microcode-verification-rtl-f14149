// ucode_binder: the set of coverage checkers for one processor's microcode.
//
// The microcode of a processor has NUM_BR branch instructions; entry i of
// SRC_PCS is the SRAM word address of branch i and entry i of DST_PCS its
// taken target. The binder creates one ucode_fc_checker per branch and wires
// all of them to the same instruction SRAM pins of the processor. Each checker
// holds two coverage bins (step next, branch), so the binder holds 2*NUM_BR
// bins; o_*_hit pulse when a bin fires and o_covered_bins counts the bins
// that have fired since reset, giving the
// "covered / total" figure of a coverage report (total = 2*NUM_BR).
// Outputs are registered inside the checkers; o_covered_bins follows them
// combinationally.
//
// In the reference flow a script reads the disassembled microcode and writes
// this list of (source, destination) pairs, one checker per branch, named
// after the labels. Here the list is a parameter, to be filled the same way
// whenever the microcode changes. The default pairs are the two of the
// reference example ('h807f -> 'h808e, 'h8082 -> 'h8087).
module ucode_binder #(
  parameter int unsigned                 AW     = 16,
  parameter int unsigned                 NUM_BR = 2,
  parameter logic [NUM_BR-1:0][AW-1:0]   SRC_PCS = {16'h8082, 16'h807f},
  parameter logic [NUM_BR-1:0][AW-1:0]   DST_PCS = {16'h8087, 16'h808e},
  parameter int unsigned                 CNT_W  = 16
) (
  input  logic                        i_clk,
  input  logic                        i_rstn,
  input  logic                        i_inst_mem_csn,
  input  logic                        i_inst_mem_wen,
  input  logic [AW-1:0]               i_inst_mem_a,
  output logic [NUM_BR-1:0]           o_step_next_hit,
  output logic [NUM_BR-1:0]           o_branch_hit,
  output logic [NUM_BR-1:0]           o_step_next_covered,
  output logic [NUM_BR-1:0]           o_branch_covered,
  output logic [NUM_BR-1:0][CNT_W-1:0] o_step_next_count,
  output logic [NUM_BR-1:0][CNT_W-1:0] o_branch_count,
  output logic [$clog2(2*NUM_BR+1)-1:0] o_covered_bins
);

  for (genvar i = 0; i < NUM_BR; i++) begin : g_chkr
    ucode_fc_checker #(
      .AW    (AW),
      .SRC_PC(SRC_PCS[i]),
      .DST_PC(DST_PCS[i]),
      .CNT_W (CNT_W)
    ) u_chkr (
      .i_clk              (i_clk),
      .i_rstn             (i_rstn),
      .i_inst_mem_csn     (i_inst_mem_csn),
      .i_inst_mem_wen     (i_inst_mem_wen),
      .i_inst_mem_a       (i_inst_mem_a),
      .o_step_next_hit    (o_step_next_hit[i]),
      .o_branch_hit       (o_branch_hit[i]),
      .o_step_next_covered(o_step_next_covered[i]),
      .o_branch_covered   (o_branch_covered[i]),
      .o_step_next_count  (o_step_next_count[i]),
      .o_branch_count     (o_branch_count[i])
    );
  end

  always_comb begin
    o_covered_bins = '0;
    for (int i = 0; i < NUM_BR; i++) begin
      o_covered_bins += $bits(o_covered_bins)'(o_step_next_covered[i]);
      o_covered_bins += $bits(o_covered_bins)'(o_branch_covered[i]);
    end
  end

endmodule
