// processor: one execution unit of the processor pool.
//
// The processor does no dataflow work at all: it takes the executable at
// the head of its own instruction-queue bank, computes OPD1 <op> OPD2 and
// returns the result packet {originating address, result} to the DFM over
// the result bus. Then it signals instr_done so the bank frees the word.
// The operations and their widths are the design's:
//   ADD  6-bit adder on OPD1[5:0] + OPD2[5:0]; the carry is result bit 6
//   SUB  7-bit OPD1 - OPD2, modulo 128
//   MUL  OPD1[3:0] x OPD2[2:0], 7-bit product
//   DIV  7-bit unsigned OPD1 / OPD2 (divide by zero gives 7'h7F, a choice
//        of this implementation)
//   CEQ CNE CGT CLT CGE CLE  unsigned 7-bit compares giving 0 or 1
// Any other opcode gives 0.
//
// Timing: execution takes EXEC_CYCLES cycles (8 in the design's
// measurements); the result request then waits for the result bus grant;
// instr_done is a one-cycle pulse in the cycle after the grant.
// Interface: instr_rd/instr from the bank, instr_done to it; res_req,
// res_msg, res_grant to the result bus controller.
module processor
  import dfc_pkg::*;
#(
  parameter int unsigned EXEC_CYCLES = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    instr_rd,
  input  exec_t   instr,
  output logic    instr_done,
  output logic    res_req,
  output result_t res_msg,
  input  logic    res_grant,
  output logic    exec_event
);

  localparam int unsigned CW = $clog2(EXEC_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_SEND, S_DONE} state_e;

  state_e        state;
  exec_t         ins_q;
  logic [CW-1:0] cnt;
  data_t         alu;

  // ALU, purely combinational on the latched executable
  always_comb begin
    logic [6:0] sum;
    sum = 7'(ins_q.opd1[5:0]) + 7'(ins_q.opd2[5:0]);
    unique case (ins_q.op)
      OP_ADD:  alu = sum;
      OP_SUB:  alu = ins_q.opd1 - ins_q.opd2;
      OP_MUL:  alu = 7'(ins_q.opd1[3:0] * ins_q.opd2[2:0]);
      OP_DIV:  alu = (ins_q.opd2 == '0) ? 7'h7F : ins_q.opd1 / ins_q.opd2;
      OP_CEQ:  alu = 7'(ins_q.opd1 == ins_q.opd2);
      OP_CNE:  alu = 7'(ins_q.opd1 != ins_q.opd2);
      OP_CGT:  alu = 7'(ins_q.opd1 >  ins_q.opd2);
      OP_CLT:  alu = 7'(ins_q.opd1 <  ins_q.opd2);
      OP_CGE:  alu = 7'(ins_q.opd1 >= ins_q.opd2);
      OP_CLE:  alu = 7'(ins_q.opd1 <= ins_q.opd2);
      default: alu = '0;
    endcase
  end

  assign res_req    = (state == S_SEND);
  assign instr_done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ins_q      <= '0;
      cnt        <= '0;
      res_msg    <= '0;
      exec_event <= 1'b0;
    end else begin
      exec_event <= 1'b0;
      unique case (state)
        S_IDLE: if (instr_rd) begin
          ins_q <= instr;
          cnt   <= CW'(EXEC_CYCLES - 1);
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            res_msg    <= '{oa: ins_q.oa, value: alu};
            exec_event <= 1'b1;
            state      <= S_SEND;
          end
        end
        S_SEND: if (res_grant) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
