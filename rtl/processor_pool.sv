// processor_pool: the pool of execution units, NPROC processors (two in
// the design's prototype).
//
// Processor i executes only from instruction-queue bank i and never
// synchronises with the others; each sends its results to the result bus
// controller on its own request line. Adding processors adds banks and
// result bus requesters, nothing else.
//
// Interface: per processor the bank handshake (instr_rd, instr,
// instr_done) and the result bus handshake (res_req, res_msg, res_grant);
// exec_events pulses when a processor finishes computing a result.
module processor_pool
  import dfc_pkg::*;
#(
  parameter int unsigned NPROC       = 2,
  parameter int unsigned EXEC_CYCLES = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] instr_rd,
  input  exec_t            instr [NPROC],
  output logic [NPROC-1:0] instr_done,
  output logic [NPROC-1:0] res_req,
  output result_t          res_msg [NPROC],
  input  logic [NPROC-1:0] res_grant,
  output logic [NPROC-1:0] exec_events
);

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    processor #(.EXEC_CYCLES(EXEC_CYCLES)) u_proc (
      .clk, .rst_n,
      .instr_rd(instr_rd[p]), .instr(instr[p]), .instr_done(instr_done[p]),
      .res_req(res_req[p]), .res_msg(res_msg[p]), .res_grant(res_grant[p]),
      .exec_event(exec_events[p])
    );
  end

endmodule
