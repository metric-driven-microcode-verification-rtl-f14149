// ucode_engine: one programmable hardware engine with its coverage checkers.
//
// The engine is a ucode_processor running microcode out of its own
// inst_sram, plus a ucode_binder that watches that SRAM's pins with one
// ucode_fc_checker per branch of the microcode (branch list SRC_PCS/DST_PCS,
// NUM_BR entries). The processor's SRAM pins go to the SRAM and, unchanged, to
// the binder, just as a bind file connects the checkers to the processor's
// o_inst_mem_csn, o_inst_mem_wen and o_inst_mem_a in the reference flow.
// Ports are those of the processor (load, start, command ports, status) and
// of the binder (coverage bins). Timing: see ucode_processor; the coverage
// outputs lag the SRAM reads by one clock.
module ucode_engine
  import ucode_pkg::*;
#(
  parameter int unsigned                     NUM_BR  = 2,
  parameter logic [NUM_BR-1:0][IMEM_AW-1:0]  SRC_PCS = {16'h8082, 16'h807f},
  parameter logic [NUM_BR-1:0][IMEM_AW-1:0]  DST_PCS = {16'h8087, 16'h808e},
  parameter int unsigned                     CNT_W   = 16
) (
  input  logic                          i_clk,
  input  logic                          i_rstn,
  input  logic                          i_load_en,
  input  pc_t                           i_load_addr,
  input  word_t                         i_load_data,
  input  logic                          i_start,
  input  pc_t                           i_start_pc,
  output logic                          o_busy,
  input  logic                          i_cmd_valid,
  input  word_t                         i_cmd_data,
  output logic                          o_cmd_ready,
  output logic                          o_cmd_valid,
  output word_t                         o_cmd_data,
  input  logic                          i_cmd_ready,
  output logic                          o_stall,
  output logic                          o_br_taken,
  output logic                          o_br_not_taken,
  output logic [NUM_BR-1:0]             o_step_next_hit,
  output logic [NUM_BR-1:0]             o_branch_hit,
  output logic [NUM_BR-1:0]             o_step_next_covered,
  output logic [NUM_BR-1:0]             o_branch_covered,
  output logic [NUM_BR-1:0][CNT_W-1:0]  o_step_next_count,
  output logic [NUM_BR-1:0][CNT_W-1:0]  o_branch_count,
  output logic [$clog2(2*NUM_BR+1)-1:0] o_covered_bins
);

  logic  inst_mem_csn, inst_mem_wen;
  pc_t   inst_mem_a;
  word_t inst_mem_d, inst_mem_q;

  ucode_processor u_proc (
    .i_clk         (i_clk),
    .i_rstn        (i_rstn),
    .i_load_en     (i_load_en),
    .i_load_addr   (i_load_addr),
    .i_load_data   (i_load_data),
    .i_start       (i_start),
    .i_start_pc    (i_start_pc),
    .o_busy        (o_busy),
    .o_inst_mem_csn(inst_mem_csn),
    .o_inst_mem_wen(inst_mem_wen),
    .o_inst_mem_a  (inst_mem_a),
    .o_inst_mem_d  (inst_mem_d),
    .i_inst_mem_q  (inst_mem_q),
    .i_cmd_valid   (i_cmd_valid),
    .i_cmd_data    (i_cmd_data),
    .o_cmd_ready   (o_cmd_ready),
    .o_cmd_valid   (o_cmd_valid),
    .o_cmd_data    (o_cmd_data),
    .i_cmd_ready   (i_cmd_ready),
    .o_stall       (o_stall),
    .o_br_taken    (o_br_taken),
    .o_br_not_taken(o_br_not_taken)
  );

  inst_sram #(.AW(IMEM_AW), .DW(XLEN)) u_inst_sram (
    .i_clk(i_clk),
    .i_csn(inst_mem_csn),
    .i_wen(inst_mem_wen),
    .i_a  (inst_mem_a),
    .i_d  (inst_mem_d),
    .o_q  (inst_mem_q)
  );

  ucode_binder #(
    .AW     (IMEM_AW),
    .NUM_BR (NUM_BR),
    .SRC_PCS(SRC_PCS),
    .DST_PCS(DST_PCS),
    .CNT_W  (CNT_W)
  ) u_binder (
    .i_clk              (i_clk),
    .i_rstn             (i_rstn),
    .i_inst_mem_csn     (inst_mem_csn),
    .i_inst_mem_wen     (inst_mem_wen),
    .i_inst_mem_a       (inst_mem_a),
    .o_step_next_hit    (o_step_next_hit),
    .o_branch_hit       (o_branch_hit),
    .o_step_next_covered(o_step_next_covered),
    .o_branch_covered   (o_branch_covered),
    .o_step_next_count  (o_step_next_count),
    .o_branch_count     (o_branch_count),
    .o_covered_bins     (o_covered_bins)
  );

endmodule
