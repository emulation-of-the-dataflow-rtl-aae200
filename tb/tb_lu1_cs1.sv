// tb_lu1_cs1: LU1 with cell section 1 of block 2. Each case loads a cell,
// sends tokens as LU2/LU3/LU4 would, and checks what LU1 emits and the
// flags it leaves behind, worked out from the firing rules:
//   ordinary instruction fires when both operands and the clause are
//   present and clears D1O, D2O and CAN; a reused operand keeps its D1O;
//   an LP=2 conditional keeps CAN; an SP cell (LP=1) forwards any operand
//   once its clause is true; an LK cell (LP=3) forwards OPD1 only once
//   both operands are present; a false clause blocks firing.
// It also checks that a token that only deposits keeps LU1 busy for
// exactly 8 cycles and that an executable is requested right after the
// 8 cycles of handling its last token (9th clock edge after the token).
module tb_lu1_cs1;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic load_en = 0, tok_valid = 0, busy, exec_req, exec_grant = 0, res_req, res_grant = 0;
  logic [7:0] load_idx = 0, peek_idx = 0;
  cs1_t load_data = '0, peek_data;
  token_t tok = '0;
  exec_t exec;
  result_t res_msg;
  logic fire_exec, fire_msg;
  lu1_cs1 #(.BLOCK_ADDR(3'd2)) dut (.*);

  exec_t   execs [$];
  result_t msgs [$];
  int      exec_req_t [$];
  logic    er_q = 0;
  always @(posedge clk) begin
    exec_grant <= exec_req && !exec_grant;
    res_grant  <= res_req && !res_grant;
    if (rst_n && exec_req && !exec_grant) execs.push_back(exec);
    if (rst_n && res_req && !res_grant) msgs.push_back(res_msg);
    if (rst_n && exec_req && !er_q) exec_req_t.push_back(cyc);
    er_q <= exec_req;
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic ld(input int idx, input cs1_t c);
    @(negedge clk); load_en = 1; load_idx = 8'(idx); load_data = c;
    @(negedge clk); load_en = 0;
  endtask
  task automatic send(input int idx, input int v, input tok_type_e t);
    @(negedge clk);
    tok_valid = 1; tok = '{caddr: {3'd2, 8'(idx)}, value: 7'(v), ttype: t};
    @(negedge clk); tok_valid = 0;
    wait (!busy);
    @(negedge clk);
  endtask
  task automatic peek(input int idx, output cs1_t c);
    @(negedge clk); peek_idx = 8'(idx); #1; c = peek_data;
  endtask
  function automatic cs1_t mk(input int op, input int lp, input int opd1, input int opd2,
                              input bit d2u, d1u, d2o, d1o, can);
    return '{opd2: 7'(opd2), opd1: 7'(opd1), op: 4'(op), lp: 2'(lp), d2u: d2u, d1u: d1u, d2o: d2o, d1o: d1o, can: can};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cs1_t c;
    int t0, nb;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1. ordinary ADD: immediate OPD2 = 5, OPD1 arrives
    ld(10, mk(1, 0, 0, 5, 0, 0, 1, 0, 1));
    @(negedge clk); tok_valid = 1; tok = '{caddr: 11'h20A, value: 7'd9, ttype: TT_OPD1}; t0 = cyc;
    @(negedge clk); tok_valid = 0;
    wait (!busy); @(negedge clk);
    chk(execs.size() == 1 && execs[0] == '{oa: 11'h20A, opd2: 7'd5, opd1: 7'd9, op: 4'd1}, "ADD executable");
    chk(exec_req_t.size() == 1 && exec_req_t[0] - t0 == 9, $sformatf("executable requested after %0d cycles", exec_req_t.size() ? exec_req_t[0] - t0 : -1));
    peek(10, c);
    chk(c.opd1 == 9 && !c.d1o && !c.d2o && !c.can, "ADD flags cleared");
    // 2. reuse: OPD1 immediate with D1U, OPD2 arrives
    ld(11, mk(3, 0, 3, 0, 0, 1, 0, 1, 1));
    send(11, 4, TT_OPD2);
    chk(execs.size() == 2 && execs[1] == '{oa: 11'h20B, opd2: 7'd4, opd1: 7'd3, op: 4'd3}, "MUL executable");
    peek(11, c);
    chk(c.d1o && !c.d2o && !c.can, "reuse keeps D1O only");
    // 3. LP=2 conditional keeps CAN
    ld(12, mk(4'b1010, 2, 0, 1, 1, 0, 1, 0, 1));
    send(12, 7, TT_OPD1);
    chk(execs.size() == 3 && execs[2] == '{oa: 11'h20C, opd2: 7'd1, opd1: 7'd7, op: 4'b1010}, "CGT executable");
    peek(12, c);
    chk(c.can && !c.d1o && c.d2o, "LP=2 keeps CAN, D2U keeps D2O");
    // 4. SP (LP=1)
    ld(13, mk(0, 1, 0, 0, 0, 0, 0, 0, 0));
    send(13, 6, TT_OPD1);
    chk(msgs.size() == 0 && execs.size() == 3, "SP waits for its clause");
    peek(13, c); chk(c.d1o && c.opd1 == 6, "SP deposited OPD1");
    send(13, 1, TT_CLAUSE);
    chk(msgs.size() == 1 && msgs[0] == '{oa: 11'h20D, value: 7'd6}, "SP forwards OPD1 on clause");
    peek(13, c); chk(!c.d1o && !c.d2o && c.can, "SP clears operand flags");
    send(13, 8, TT_OPD2);
    chk(msgs.size() == 2 && msgs[1] == '{oa: 11'h20D, value: 7'd8}, "SP forwards OPD2 at once");
    // 5. LK (LP=3)
    ld(14, mk(0, 3, 0, 0, 0, 0, 0, 0, 1));
    send(14, 5, TT_OPD1);
    chk(msgs.size() == 2, "LK waits for both operands");
    send(14, 2, TT_OPD2);
    chk(msgs.size() == 3 && msgs[2] == '{oa: 11'h20E, value: 7'd5}, "LK forwards OPD1");
    chk(execs.size() == 3, "SP/LK never executed");
    // 6. false clause blocks, true clause fires; deposit-only busy time
    ld(15, mk(2, 0, 20, 3, 0, 0, 1, 1, 0));
    @(negedge clk); tok_valid = 1; tok = '{caddr: 11'h20F, value: 7'd0, ttype: TT_CLAUSE};
    @(negedge clk); tok_valid = 0; nb = 1;
    while (busy) begin @(negedge clk); nb++; end
    chk(nb == 8, $sformatf("deposit busy %0d cycles", nb));
    chk(execs.size() == 3, "false clause blocks");
    send(15, 1, TT_CLAUSE);
    chk(execs.size() == 4 && execs[3] == '{oa: 11'h20F, opd2: 7'd3, opd1: 7'd20, op: 4'd2}, "true clause fires SUB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
