// tb_dfm_block: one DFM block (block 2, compare time shortened to 1 cycle
// per cell). All 256 cells are cleared, then four are programmed:
//   205  ADD, OPD1 from 100, immediate OPD2 = 4
//   206  SUB, OPD1 from 100, OPD2 from 101
//   207  LK holding OPD1 = 33 and OPD2, clause from 102
//   208  MUL holding OPD1 = 5, OPD2 = 6, clause from 100
// Three result packets (100 = 9, 101 = 3, 102 = 1) arrive on consecutive
// cycles, so the queue buffer must hold two of them. Checks: exactly the
// executables ADD(9,4)@205, SUB(9,3)@206, MUL(5,6)@208 leave the block,
// exactly one forwarded packet {207, 33} appears, the match count is 5,
// packets were queued, and the final CS1 flags of the four cells follow
// the firing rules. Instruction/result bus grants are given after a short
// random delay.
module tb_dfm_block;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load_en = 0, rb_valid = 0, busy, exec_req, exec_grant = 0, res_req, res_grant = 0;
  logic [7:0] load_idx = 0, peek_idx = 0;
  cell_t load_data = '0;
  result_t rb_msg = '0, res_msg;
  exec_t exec;
  cs1_t peek_data;
  logic fire_exec_event, fire_msg_event, queued_event;
  logic [2:0] match_event;
  dfm_block #(.BLOCK_ADDR(3'd2), .CYCLES_PER_CELL(1)) dut (.*);

  exec_t execs [$];
  result_t msgs [$];
  int nmatch = 0, nqueued = 0;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic ld(input int idx, input cell_t c);
    @(negedge clk); load_en = 1; load_idx = 8'(idx); load_data = c;
    @(negedge clk); load_en = 0;
  endtask
  function automatic cs1_t cs1(input int op, input int lp, input int opd1, input int opd2, input bit d2o, d1o, can);
    return '{opd2: 7'(opd2), opd1: 7'(opd1), op: 4'(op), lp: 2'(lp), d2u: 0, d1u: 0, d2o: d2o, d1o: d1o, can: can};
  endfunction
  function automatic csx_t src(input int a);
    return '{addr: 11'(a), req: 1'b1};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    exec_grant = 0; res_grant = 0;
    if (exec_req && $urandom_range(0, 2) == 0) begin exec_grant = 1; execs.push_back(exec); end
    if (res_req && $urandom_range(0, 2) == 0) begin res_grant = 1; msgs.push_back(res_msg); end
  end
  always @(posedge clk) if (rst_n) begin
    nmatch += $countones(match_event);
    if (queued_event) nqueued++;
  end

  function automatic bit has(input exec_t e);
    foreach (execs[i]) if (execs[i] == e) return 1;
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) ld(i, '0);
    ld(5, '{cs4: '0, cs3: src('h100), cs2: '0, cs1: cs1(1, 0, 0, 4, 1, 0, 1)});
    ld(6, '{cs4: src('h101), cs3: src('h100), cs2: '0, cs1: cs1(2, 0, 0, 0, 0, 0, 1)});
    ld(7, '{cs4: '0, cs3: '0, cs2: src('h102), cs1: cs1(0, 3, 33, 0, 1, 1, 0)});
    ld(8, '{cs4: '0, cs3: '0, cs2: src('h100), cs1: cs1(3, 0, 5, 6, 1, 1, 0)});
    repeat (3) @(negedge clk);
    chk(!busy, "idle before packets");
    rb_valid = 1; rb_msg = '{oa: 11'h100, value: 7'd9};
    @(negedge clk); rb_msg = '{oa: 11'h101, value: 7'd3};
    @(negedge clk); rb_msg = '{oa: 11'h102, value: 7'd1};
    @(negedge clk); rb_valid = 0;
    wait (execs.size() == 3 && msgs.size() == 1);
    repeat (600) @(negedge clk);
    chk(execs.size() == 3, $sformatf("%0d executables", execs.size()));
    chk(has('{oa: 11'h205, opd2: 7'd4, opd1: 7'd9, op: 4'd1}), "ADD(9,4)@205");
    chk(has('{oa: 11'h206, opd2: 7'd3, opd1: 7'd9, op: 4'd2}), "SUB(9,3)@206");
    chk(has('{oa: 11'h208, opd2: 7'd6, opd1: 7'd5, op: 4'd3}), "MUL(5,6)@208");
    chk(msgs.size() == 1 && msgs[0] == '{oa: 11'h207, value: 7'd33}, "LK forward {207,33}");
    chk(nmatch == 5, $sformatf("matches %0d", nmatch));
    chk(nqueued >= 2, $sformatf("queued %0d", nqueued));
    peek_idx = 5; #1; chk(!peek_data.d1o && !peek_data.d2o && !peek_data.can, "205 flags");
    peek_idx = 6; #1; chk(!peek_data.d1o && !peek_data.d2o && !peek_data.can, "206 flags");
    peek_idx = 7; #1; chk(!peek_data.d1o && !peek_data.d2o && peek_data.can, "207 flags");
    peek_idx = 8; #1; chk(!peek_data.d1o && !peek_data.d2o && !peek_data.can, "208 flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
