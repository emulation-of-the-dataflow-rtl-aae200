// dataflow_computer: a dataflow computer whose memory does the dataflow
// work.
//
// The program lives in the Dataflow Memory (DFM). Every result is
// broadcast to all cells; each cell compares the result's originating
// address with the addresses its operands and clause come from, takes what
// it needs and, once both operands and its clause are present, sends
// itself as an executable to the Instruction Queue (IQ). The IQ deals the
// executables round-robin to one bank per processor; the processors of the
// pool execute them in any order and send the results back to the DFM,
// closing the loop. There is no program counter; SP and LK cells steer
// loops inside the DFM without going through a processor.
//
// Defaults are the design's: 8 DFM blocks of 256 cells (2K words, 11-bit
// addresses), 7-bit data, 2 processors with 16-word banks, a 256-entry
// result queue per block, 5 cycles per cell compare, 8 cycles per LU1
// token, 8 execution cycles and 6/7-cycle bus services.
//
// Interface: load/load_addr/load_data write program cells (61-bit word,
// see dfc_pkg); a rising edge on init sends the seed clause from address
// 7FF; rb_valid/rb_msg show every result packet on the result bus;
// peek_addr/peek_data read the CS1 section (operands and flags) of any
// cell; the remaining outputs are one-cycle event pulses for counting:
// per block for executables fired, SP/LK packets forwarded and packets
// queued, per block and section (bit 3*b+0 LU2, +1 LU3, +2 LU4) for
// matches, per processor for executions and bank-full, plus IQ skips.
//
// Reset: rst_n is an asynchronous, active-low reset for every flip-flop.
// The assertions in the submodules also use it, synchronously, as their
// disable condition; that use is for simulation only.
module dataflow_computer
  import dfc_pkg::*;
#(
  parameter int unsigned NBLOCKS         = 8,
  parameter int unsigned NPROC           = 2,
  parameter int unsigned BANK_AW         = 4,
  parameter int unsigned QB_AW           = 8,
  parameter int unsigned CYCLES_PER_CELL = 5,
  parameter int unsigned TOKEN_CYCLES    = 8,
  parameter int unsigned EXEC_CYCLES     = 8,
  parameter int unsigned RBUS_SERVICE    = 6,
  parameter int unsigned OBUS_SERVICE    = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [10:0]      load_addr,
  input  logic [60:0]      load_data,
  input  logic             init,
  output logic             rb_valid,
  output logic [17:0]      rb_msg,
  input  logic [10:0]      peek_addr,
  output logic [24:0]      peek_data,
  output logic [NBLOCKS-1:0]   fire_exec_event,
  output logic [NBLOCKS-1:0]   fire_msg_event,
  output logic [3*NBLOCKS-1:0] match_event,
  output logic [NBLOCKS-1:0]   queued_event,
  output logic             qb_busy,
  output logic             iq_skip_event,
  output logic [NPROC-1:0] bank_full,
  output logic [NPROC-1:0] proc_exec_event
);

  logic             exec_valid, iq_busy;
  exec_t            exec;
  logic [NPROC-1:0] instr_rd, instr_done, p_req, p_grant;
  exec_t            instr [NPROC];
  result_t          p_msg [NPROC];
  result_t          rb_s;
  cs1_t             peek_s;

  dfm #(
    .NBLOCKS(NBLOCKS), .NPROC(NPROC), .CYCLES_PER_CELL(CYCLES_PER_CELL),
    .TOKEN_CYCLES(TOKEN_CYCLES), .RBUS_SERVICE(RBUS_SERVICE),
    .OBUS_SERVICE(OBUS_SERVICE), .QB_AW(QB_AW)
  ) u_dfm (
    .clk, .rst_n,
    .load, .load_addr, .load_data(cell_t'(load_data)), .init,
    .proc_req(p_req), .proc_msg(p_msg), .proc_grant(p_grant),
    .exec_valid, .exec, .iq_busy,
    .rb_valid, .rb_msg(rb_s),
    .peek_addr, .peek_data(peek_s),
    .fire_exec_events(fire_exec_event), .fire_msg_events(fire_msg_event),
    .match_events(match_event), .queued_events(queued_event), .qb_busy
  );

  assign rb_msg    = rb_s;
  assign peek_data = peek_s;

  instruction_queue #(.NBANKS(NPROC), .BANK_AW(BANK_AW)) u_iq (
    .clk, .rst_n,
    .in_valid(exec_valid), .in_exec(exec), .busy(iq_busy),
    .instr_rd, .instr, .instr_done,
    .skip_event(iq_skip_event), .bank_full
  );

  processor_pool #(.NPROC(NPROC), .EXEC_CYCLES(EXEC_CYCLES)) u_pool (
    .clk, .rst_n,
    .instr_rd, .instr, .instr_done,
    .res_req(p_req), .res_msg(p_msg), .res_grant(p_grant),
    .exec_events(proc_exec_event)
  );

endmodule
