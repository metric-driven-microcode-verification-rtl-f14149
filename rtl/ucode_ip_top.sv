// ucode_ip_top: microcode-driven IP with a chain of NPROC programmable engines.
//
// NPROC ucode_engine instances (four, as in the reference IP) are placed in a
// chain on the command path: the upstream command port of the top feeds
// engine 0, engine i's downstream port feeds engine i+1, and the last engine
// drives the downstream port of the top. Each engine can then work on a
// different stage of a command while the next command enters, which is how
// the chain processes commands in parallel. Each engine has its own
// instruction SRAM and its own microcode, so each has its own coverage binder,
// with the branch list of that engine's microcode in SRC_PCS[e]/DST_PCS[e].
// Engines run different microcode, so each has its own branch count
// NUM_BRS[e] (1 to NUM_BR); it uses the low NUM_BRS[e] entries of its row of
// the branch lists, and its unused coverage outputs read as zero.
//
// Microcode load: while engine i_load_sel is idle, each cycle with i_load_en
// high writes i_load_data to word i_load_addr of its SRAM. i_start[e] starts
// engine e at i_start_pc[e]. All ports are plain vectors indexed by engine.
// Handshakes on the command ports are valid/ready: a word moves in a cycle
// with both high. The chain's command format and this load/start control are
// this design's own; the reference design gives only the engine count, the
// chain and one binder per processor. The default branch lists repeat the two
// branches of the reference binder example for every engine.
module ucode_ip_top
  import ucode_pkg::*;
#(
  parameter int unsigned NPROC  = 4,
  parameter int unsigned NUM_BR = 2,
  parameter logic [NPROC-1:0][15:0] NUM_BRS = {NPROC{16'(NUM_BR)}},
  parameter logic [NPROC-1:0][NUM_BR-1:0][IMEM_AW-1:0] SRC_PCS =
    {NPROC{16'h8082, 16'h807f}},
  parameter logic [NPROC-1:0][NUM_BR-1:0][IMEM_AW-1:0] DST_PCS =
    {NPROC{16'h8087, 16'h808e}},
  parameter int unsigned CNT_W  = 16
) (
  input  logic                                      i_clk,
  input  logic                                      i_rstn,
  // microcode load and start
  input  logic                                      i_load_en,
  input  logic [$clog2(NPROC)-1:0]                  i_load_sel,
  input  pc_t                                       i_load_addr,
  input  word_t                                     i_load_data,
  input  logic [NPROC-1:0]                          i_start,
  input  pc_t  [NPROC-1:0]                          i_start_pc,
  output logic [NPROC-1:0]                          o_busy,
  // command path into engine 0 and out of the last engine
  input  logic                                      i_cmd_valid,
  input  word_t                                     i_cmd_data,
  output logic                                      o_cmd_ready,
  output logic                                      o_cmd_valid,
  output word_t                                     o_cmd_data,
  input  logic                                      i_cmd_ready,
  // status strobes per engine
  output logic [NPROC-1:0]                          o_stall,
  output logic [NPROC-1:0]                          o_br_taken,
  output logic [NPROC-1:0]                          o_br_not_taken,
  // microcode coverage per engine: bin hit strobes, sticky bins, hit counts
  output logic [NPROC-1:0][NUM_BR-1:0]              o_step_next_hit,
  output logic [NPROC-1:0][NUM_BR-1:0]              o_branch_hit,
  output logic [NPROC-1:0][NUM_BR-1:0]              o_step_next_covered,
  output logic [NPROC-1:0][NUM_BR-1:0]              o_branch_covered,
  output logic [NPROC-1:0][NUM_BR-1:0][CNT_W-1:0]   o_step_next_count,
  output logic [NPROC-1:0][NUM_BR-1:0][CNT_W-1:0]   o_branch_count,
  output logic [NPROC-1:0][$clog2(2*NUM_BR+1)-1:0]  o_covered_bins
);

  // chain links: link e enters engine e, link e+1 leaves it
  logic  [NPROC:0] lnk_valid, lnk_ready;
  word_t [NPROC:0] lnk_data;

  assign lnk_valid[0] = i_cmd_valid;
  assign lnk_data[0]  = i_cmd_data;
  assign o_cmd_ready  = lnk_ready[0];
  assign o_cmd_valid  = lnk_valid[NPROC];
  assign o_cmd_data   = lnk_data[NPROC];
  assign lnk_ready[NPROC] = i_cmd_ready;

  for (genvar e = 0; e < NPROC; e++) begin : g_eng
    localparam int unsigned NB = int'(NUM_BRS[e]);  // branches of this engine
    localparam int unsigned BW = $clog2(2*NB+1);

    logic [NB-1:0]            s_hit, b_hit, s_cov, b_cov;
    logic [NB-1:0][CNT_W-1:0] s_cnt, b_cnt;
    logic [BW-1:0]            nbins;

    ucode_engine #(
      .NUM_BR (NB),
      .SRC_PCS(SRC_PCS[e][NB-1:0]),
      .DST_PCS(DST_PCS[e][NB-1:0]),
      .CNT_W  (CNT_W)
    ) u_eng (
      .i_clk              (i_clk),
      .i_rstn             (i_rstn),
      .i_load_en          (i_load_en && (i_load_sel == e)),
      .i_load_addr        (i_load_addr),
      .i_load_data        (i_load_data),
      .i_start            (i_start[e]),
      .i_start_pc         (i_start_pc[e]),
      .o_busy             (o_busy[e]),
      .i_cmd_valid        (lnk_valid[e]),
      .i_cmd_data         (lnk_data[e]),
      .o_cmd_ready        (lnk_ready[e]),
      .o_cmd_valid        (lnk_valid[e+1]),
      .o_cmd_data         (lnk_data[e+1]),
      .i_cmd_ready        (lnk_ready[e+1]),
      .o_stall            (o_stall[e]),
      .o_br_taken         (o_br_taken[e]),
      .o_br_not_taken     (o_br_not_taken[e]),
      .o_step_next_hit    (s_hit),
      .o_branch_hit       (b_hit),
      .o_step_next_covered(s_cov),
      .o_branch_covered   (b_cov),
      .o_step_next_count  (s_cnt),
      .o_branch_count     (b_cnt),
      .o_covered_bins     (nbins)
    );

    // engine e uses the low NB entries of its row; the rest read as zero
    always_comb begin
      o_step_next_hit[e]     = '0;
      o_branch_hit[e]        = '0;
      o_step_next_covered[e] = '0;
      o_branch_covered[e]    = '0;
      o_step_next_count[e]   = '0;
      o_branch_count[e]      = '0;
      o_step_next_hit[e][NB-1:0]     = s_hit;
      o_branch_hit[e][NB-1:0]        = b_hit;
      o_step_next_covered[e][NB-1:0] = s_cov;
      o_branch_covered[e][NB-1:0]    = b_cov;
      o_step_next_count[e][NB-1:0]   = s_cnt;
      o_branch_count[e][NB-1:0]      = b_cnt;
      o_covered_bins[e]              = $bits(o_covered_bins[e])'(nbins);
    end
  end

endmodule
