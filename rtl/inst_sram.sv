// inst_sram: single-port instruction SRAM that holds one engine's microcode.
//
// The control pins follow the usual SRAM macro convention that the coverage
// checker relies on: i_csn (chip select, active low) and i_wen (write enable,
// active low). With i_csn low, i_wen high reads word i_a; o_q shows it one
// clock later, the one-cycle fetch latency that makes a branch visible on the
// address bus only two reads after the branch instruction. With i_csn and
// i_wen low, i_d is written to word i_a. When the SRAM is not read, o_q keeps
// the last word read, so the processor can stall on a fetched instruction.
// The storage is a plain array; it has no reset, as the microcode is written
// through the same port before the engine is started. Depth is 2**AW words
// (AW = 16 as on the reference checker's address port).
module inst_sram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32
) (
  input  logic          i_clk,
  input  logic          i_csn,
  input  logic          i_wen,
  input  logic [AW-1:0] i_a,
  input  logic [DW-1:0] i_d,
  output logic [DW-1:0] o_q
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge i_clk) begin
    if (!i_csn) begin
      if (!i_wen) mem[i_a] <= i_d;
      else        o_q      <= mem[i_a];
    end
  end

endmodule
