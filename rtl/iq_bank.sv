// iq_bank: one memory bank of the Instruction Queue with its memory
// controller (MC).
//
// The bank is a circular queue of 2**A_WIDTH executables (16 words in the
// design) addressed by two pointers: NILP, where the next executable from
// the bank arbitrator is written, and NIEP, the next executable for this
// bank's processor. Equal pointers mean empty; NILP = NIEP - 1 means full,
// so 15 of the 16 words are usable. While the MC is storing a word, or the
// queue is full, it reports busy to the bank arbitrator. These rules are
// the design's.
//
// Interface and timing: the arbitrator pulses wr_en with wr_data while
// busy is low; the MC latches the word, stores it at NILP on the next
// edge, advances NILP and pulses ack in the following cycle. instr_rd is
// high whenever the queue holds an executable, which instr shows; the
// processor pulses instr_done once it has finished with it, which advances
// NIEP. Storing and removing work in parallel (dual-port memory).
module iq_bank
  import dfc_pkg::*;
#(
  parameter int unsigned A_WIDTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  exec_t wr_data,
  output logic  busy,
  output logic  ack,
  output logic  instr_rd,
  output exec_t instr,
  input  logic  instr_done,
  output logic [A_WIDTH-1:0] nilp,
  output logic [A_WIDTH-1:0] niep
);

  logic  pending;
  exec_t pend_data;
  logic  q_empty, q_full;
  logic [$bits(exec_t)-1:0] q_dout;

  circ_queue #(.D_WIDTH($bits(exec_t)), .A_WIDTH(A_WIDTH)) u_q (
    .clk, .rst_n,
    .push(pending && !q_full), .din(pend_data),
    .pop(instr_done), .dout(q_dout),
    .empty(q_empty), .full(q_full),
    .wr_ptr(nilp), .rd_ptr(niep)
  );

  assign busy     = pending || q_full;
  assign instr_rd = !q_empty;
  assign instr    = exec_t'(q_dout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      pend_data <= '0;
      ack       <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (pending) begin
        if (!q_full) begin
          pending <= 1'b0;
          ack     <= 1'b1;
        end
      end else if (wr_en) begin
        pending   <= 1'b1;
        pend_data <= wr_data;
      end
    end
  end

  a_no_write_when_busy : assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !busy);
  a_no_pop_when_empty  : assert property (@(posedge clk) disable iff (!rst_n) instr_done |-> instr_rd);

endmodule
