// instruction_queue: the Instruction Queue (IQ), the buffer between the
// Dataflow Memory and the processor pool.
//
// Only executables, instructions whose operands and clause have all
// arrived, are held here. The bank arbitrator deals them out round-robin
// to NBANKS memory banks, one per processor, so every processor can fetch
// from its own bank at the same time as the arbitrator fills the banks.
// Each bank is a 16-word circular queue. There is no crossbar: a processor
// only ever executes from its own bank. All of this is the design's.
//
// Interface: in_valid/in_exec/busy from the instruction bus; per bank
// instr_rd, instr and instr_done towards its processor; skip_event when a
// busy bank was passed over.
module instruction_queue
  import dfc_pkg::*;
#(
  parameter int unsigned NBANKS  = 2,
  parameter int unsigned BANK_AW = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  exec_t             in_exec,
  output logic              busy,
  output logic [NBANKS-1:0] instr_rd,
  output exec_t             instr [NBANKS],
  input  logic [NBANKS-1:0] instr_done,
  output logic              skip_event,
  output logic [NBANKS-1:0] bank_full
);

  logic [NBANKS-1:0] bank_wr, bank_busy, bank_ack;
  exec_t             bank_data;

  bank_arbitrator #(.NBANKS(NBANKS)) u_ba (
    .clk, .rst_n,
    .in_valid, .in_exec, .busy,
    .bank_wr, .bank_data, .bank_busy, .bank_ack,
    .skip_event
  );

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [BANK_AW-1:0] nilp, niep;
    iq_bank #(.A_WIDTH(BANK_AW)) u_bank (
      .clk, .rst_n,
      .wr_en(bank_wr[b]), .wr_data(bank_data),
      .busy(bank_busy[b]), .ack(bank_ack[b]),
      .instr_rd(instr_rd[b]), .instr(instr[b]), .instr_done(instr_done[b]),
      .nilp, .niep
    );
    assign bank_full[b] = (nilp == BANK_AW'(niep - 1'b1));
  end

endmodule
