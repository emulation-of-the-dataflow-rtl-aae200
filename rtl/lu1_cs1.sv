// lu1_cs1: cell section 1 and its logic unit LU1 for the 256 cells of a
// DFM block. This is where an instruction "fires".
//
// CS1 holds, per cell, the opcode, both operands and the flags: operand
// obtained (D1O, D2O), operand reuse (D1U, D2U), clause answer (CAN) and
// the 2-bit loop field LP. LU1 takes one token at a time from LU2/LU3/LU4
// ({cell address, value, type}), stores the value in the addressed cell
// (operand 1, operand 2 or the clause bit) and then decides:
//   LP=1 (SP, loop entry): if CAN and either operand is present, forward
//        the operand as a result packet of this cell and clear D1O/D2O.
//   LP=3 (LK, lock): if CAN and both operands are present, forward OPD1 as
//        a result packet of this cell and clear D1O/D2O.
//   otherwise, if CAN and both operands are present: send the executable
//        {cell address, OPD2, OPD1, opcode} to the instruction queue; clear
//        D1O unless D1U, clear D2O unless D2U, clear CAN only if LP=0 (an
//        LP=2 loop conditional keeps its clause).
// These rules are the design's. SP/LK packets are never executed; they go
// back onto the result bus through the result bus controller.
//
// Timing: a token occupies LU1 for at least TOKEN_CYCLES cycles (8 in the
// design's measurements) plus any wait for the instruction bus or the
// result bus. busy is high for that whole time and keeps the LU234 bus
// controller from granting. The clause bit takes bit 0 of the token value
// (conditionals produce 0 or 1), an implementation choice.
//
// Interface: load port (program load, one CS1 word), tok_valid/tok from
// the LU234 bus, exec_req/exec/exec_grant to the instruction bus,
// res_req/res_msg/res_grant to the result bus, peek_idx/peek_data to read
// a cell for observation, fire_exec/fire_msg one-cycle event pulses.
module lu1_cs1
  import dfc_pkg::*;
#(
  parameter logic [2:0]  BLOCK_ADDR   = 3'd0,
  parameter int unsigned TOKEN_CYCLES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_en,
  input  logic [CELL_AW-1:0] load_idx,
  input  cs1_t               load_data,
  input  logic               tok_valid,
  input  token_t             tok,
  output logic               busy,
  output logic               exec_req,
  output exec_t              exec,
  input  logic               exec_grant,
  output logic               res_req,
  output result_t            res_msg,
  input  logic               res_grant,
  input  logic [CELL_AW-1:0] peek_idx,
  output cs1_t               peek_data,
  output logic               fire_exec,
  output logic               fire_msg
);

  localparam int unsigned PW = $clog2(TOKEN_CYCLES + 1);

  typedef enum logic [2:0] {S_IDLE, S_UPD, S_PACE, S_EXEC, S_MSG} state_e;
  typedef enum logic [1:0] {A_NONE, A_EXEC, A_MSG} action_e;

  cs1_t               cs1_mem [2**CELL_AW];
  state_e             state;
  token_t             tok_q;
  logic [PW-1:0]      pace;
  action_e            action_q;
  logic [CELL_AW-1:0] cidx;

  cs1_t    cur, nxt;
  action_e act;
  data_t   fwd_value;

  assign cidx      = tok_q.caddr[CELL_AW-1:0];
  assign cur       = cs1_mem[cidx];
  assign peek_data = cs1_mem[peek_idx];
  assign busy      = (state != S_IDLE);

  // deposit the token, then apply the firing rules
  always_comb begin
    nxt = cur;
    act = A_NONE;
    fwd_value = '0;
    unique case (tok_q.ttype)
      TT_OPD1: begin nxt.opd1 = tok_q.value; nxt.d1o = 1'b1; end
      TT_OPD2: begin nxt.opd2 = tok_q.value; nxt.d2o = 1'b1; end
      default: nxt.can = tok_q.value[0];
    endcase
    if (nxt.lp == LP_SP && nxt.can && (nxt.d1o || nxt.d2o)) begin
      act = A_MSG;
      if (tok_q.ttype == TT_OPD2)      fwd_value = nxt.opd2;
      else if (tok_q.ttype == TT_OPD1) fwd_value = nxt.opd1;
      else                             fwd_value = nxt.d1o ? nxt.opd1 : nxt.opd2;
      nxt.d1o = 1'b0;
      nxt.d2o = 1'b0;
    end else if (nxt.lp == LP_LK && nxt.d1o && nxt.d2o && nxt.can) begin
      act = A_MSG;
      fwd_value = nxt.opd1;
      nxt.d1o = 1'b0;
      nxt.d2o = 1'b0;
    end else if (nxt.d1o && nxt.d2o && nxt.can) begin
      act = A_EXEC;
      if (!nxt.d1u) nxt.d1o = 1'b0;
      if (!nxt.d2u) nxt.d2o = 1'b0;
      if (nxt.lp != LP_COND) nxt.can = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load_en) cs1_mem[load_idx] <= load_data;
    else if (state == S_UPD) cs1_mem[cidx] <= nxt;
  end

  assign exec_req = (state == S_EXEC);
  assign res_req  = (state == S_MSG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tok_q     <= '0;
      pace      <= '0;
      action_q  <= A_NONE;
      exec      <= '0;
      res_msg   <= '0;
      fire_exec <= 1'b0;
      fire_msg  <= 1'b0;
    end else begin
      fire_exec <= 1'b0;
      fire_msg  <= 1'b0;
      unique case (state)
        S_IDLE: if (tok_valid) begin
          tok_q <= tok;
          state <= S_UPD;
        end
        S_UPD: begin
          action_q <= act;
          exec     <= '{oa: {BLOCK_ADDR, cidx}, opd2: nxt.opd2, opd1: nxt.opd1, op: nxt.op};
          res_msg  <= '{oa: {BLOCK_ADDR, cidx}, value: fwd_value};
          pace     <= PW'(TOKEN_CYCLES > 3 ? TOKEN_CYCLES - 3 : 0);
          state    <= S_PACE;
        end
        S_PACE: begin
          if (pace != '0) pace <= pace - 1'b1;
          else begin
            unique case (action_q)
              A_EXEC:  state <= S_EXEC;
              A_MSG:   state <= S_MSG;
              default: state <= S_IDLE;
            endcase
          end
        end
        S_EXEC: if (exec_grant) begin
          fire_exec <= 1'b1;
          state     <= S_IDLE;
        end
        S_MSG: if (res_grant) begin
          fire_msg <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a token must never arrive while LU1 is still working on one
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n) tok_valid |-> state == S_IDLE);

endmodule
