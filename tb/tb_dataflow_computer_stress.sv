// tb_dataflow_computer_stress: the whole machine shrunk so that its
// back-pressure paths are exercised: 2 blocks, 2 processors whose banks
// hold three executables each, 40-cycle execution, 8-entry queue buffers
// (7 usable) and 1-cycle cell compares. (With still smaller queues and
// banks this program locks up: a block's LU1 waits for a full instruction
// queue, the processors wait for the result bus, and the result bus waits
// for that block's full queue buffer. The design's 256-entry queue
// buffers are what keeps this from happening in practice.) Two programs run at the same time from the seed:
//
//   block 0, cells 001..00C: twelve independent MULs, OPD1 = seed value 1
//     (from 7FF), immediate OPD2 = k, so the result of cell k is k mod 8
//     (the multiplier takes 3 bits of OPD2). They flood the instruction
//     queue: both banks fill and the bank arbitrator has to skip.
//   block 1, a counting loop "i = 1; do i = i + 1 while i < 5":
//     101 A  SP (LP=1), clause preset: OPD1 from the seed, OPD2 from L;
//            forwards whichever arrives as the loop variable
//     102 B  ADD (LP=2 keeps its clause), OPD1 from A, OPD2 = 1 reused (D2U)
//     103 C  CLT (LP=2), OPD1 from B, OPD2 = 5 reused (D2U)
//     104 L  LK (LP=3): OPD1 from B, OPD2 and clause from C; passes B back
//            to A only when C says "continue", and keeps the final value
//
// Checks: every packet on the result bus against the expected sequence per
// originating address (A: 1,2,3,4; B: 2,3,4,5; C: 1,1,1,0; L: 2,3,4;
// MUL k: k mod 8); L ends holding 5 with D1O set; packet and executable
// counts; and that each mechanism occurred: bank skips, both banks full,
// queue-buffer queueing, queue buffer full (result bus held off), SP and LK
// forwarding, operand reuse and both processors executing.
module tb_dataflow_computer_stress;
  import dfc_pkg::*;
  localparam int NB = 2, NP = 2;

  logic clk = 0, rst_n = 0;
  logic load = 0, init = 0;
  logic [10:0] load_addr = '0, peek_addr = '0;
  logic [60:0] load_data = '0;
  logic rb_valid, qb_busy, iq_skip_event;
  logic [17:0] rb_msg;
  logic [24:0] peek_data;
  logic [NB-1:0] fire_exec_event, fire_msg_event, queued_event;
  logic [3*NB-1:0] match_event;
  logic [NP-1:0] bank_full, proc_exec_event;

  dataflow_computer #(
    .NBLOCKS(NB), .NPROC(NP), .BANK_AW(2), .QB_AW(3),
    .CYCLES_PER_CELL(1), .EXEC_CYCLES(40)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pkt = 0, ev_exec = 0, ev_msg_a = 0, ev_msg_l = 0, ev_q = 0, ev_skip = 0, qb_full_cyc = 0;
  int full0 = 0, full1 = 0, ev_p0 = 0, ev_p1 = 0;
  int exp_a [$] = '{1, 2, 3, 4};
  int exp_b [$] = '{2, 3, 4, 5};
  int exp_c [$] = '{1, 1, 1, 0};
  int exp_l [$] = '{2, 3, 4};
  bit mul_seen [13];

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic put(input int a, input cell_t c);
    @(negedge clk); load = 1; load_addr = 11'(a); load_data = c;
    @(negedge clk); load = 0;
  endtask
  function automatic csx_t src(input int a);
    return '{addr: 11'(a), req: 1'b1};
  endfunction
  function automatic cs1_t c1(input int op, input int lp, input int opd1, input int opd2,
                              input bit d2u, d1u, d2o, d1o, can);
    return '{opd2: 7'(opd2), opd1: 7'(opd1), op: 4'(op), lp: 2'(lp), d2u: d2u, d1u: d1u, d2o: d2o, d1o: d1o, can: can};
  endfunction
  task automatic expect_next(inout int q [$], input int v, input string name);
    chk(q.size() > 0 && q[0] == v, $sformatf("%s produced %0d, expected %0d", name, v, q.size() ? q[0] : -1));
    if (q.size() > 0) void'(q.pop_front());
  endtask

  always @(posedge clk) if (rst_n) begin
    ev_exec += $countones(fire_exec_event);
    ev_q    += $countones(queued_event);
    if (iq_skip_event) ev_skip++;
    if (qb_busy) qb_full_cyc++;
    if (bank_full[0]) full0++;
    if (bank_full[1]) full1++;
    if (proc_exec_event[0]) ev_p0++;
    if (proc_exec_event[1]) ev_p1++;
    if (rb_valid) begin
      int oa, v;
      oa = int'(rb_msg[17:7]); v = int'(rb_msg[6:0]);
      n_pkt++;
      case (oa)
        'h7FF: chk(v == 1, "seed value");
        'h101: begin expect_next(exp_a, v, "A"); ev_msg_a++; end
        'h102: expect_next(exp_b, v, "B");
        'h103: expect_next(exp_c, v, "C");
        'h104: begin expect_next(exp_l, v, "L"); ev_msg_l++; end
        default:
          if (oa >= 1 && oa <= 12) begin
            chk(!mul_seen[oa] && v == oa % 8, $sformatf("MUL %0d gave %0d", oa, v));
            mul_seen[oa] = 1;
          end else chk(0, $sformatf("stray packet from %h", oa));
      endcase
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nmul;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 256 * NB; a++) put(a, '0);
    for (int k = 1; k <= 12; k++)
      put(k, '{cs4: '0, cs3: src('h7FF), cs2: '0, cs1: c1(3, 0, 0, k, 0, 0, 1, 0, 1)});
    put('h101, '{cs4: src('h104), cs3: src('h7FF), cs2: '0,         cs1: c1(0, 1, 0, 0, 0, 0, 0, 0, 1)});
    put('h102, '{cs4: '0,         cs3: src('h101), cs2: '0,         cs1: c1(1, 2, 0, 1, 1, 0, 1, 0, 1)});
    put('h103, '{cs4: '0,         cs3: src('h102), cs2: '0,         cs1: c1(11, 2, 0, 5, 1, 0, 1, 0, 1)});
    put('h104, '{cs4: src('h103), cs3: src('h102), cs2: src('h103), cs1: c1(0, 3, 0, 0, 0, 0, 0, 0, 0)});
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    wait (n_pkt == 1 + 12 + 15);
    repeat (3000) @(negedge clk);
    nmul = 0; foreach (mul_seen[k]) nmul += mul_seen[k];
    chk(nmul == 12, $sformatf("MUL results %0d", nmul));
    chk(exp_a.size() == 0 && exp_b.size() == 0 && exp_c.size() == 0 && exp_l.size() == 0, "loop sequences complete");
    chk(n_pkt == 28, $sformatf("packets %0d", n_pkt));
    chk(ev_exec == 12 + 8, $sformatf("executables %0d", ev_exec));
    peek_addr = 11'h104; #1;
    chk(peek_data[17:11] == 7'd5 && peek_data[1], "L holds the final i = 5");
    peek_addr = 11'h102; #1;
    chk(peek_data[2] && peek_data[24:18] == 7'd1 && peek_data[0], "B kept its reused OPD2 and its clause");
    chk(ev_skip > 0, $sformatf("bank skips %0d", ev_skip));
    chk(full0 > 0 && full1 > 0, "both banks full at some time");
    chk(ev_q > 0, "queue buffer queued packets");
    chk(qb_full_cyc > 0, "queue buffer full held the result bus");
    chk(ev_msg_a == 4 && ev_msg_l == 3, "SP and LK forwards");
    chk(ev_p0 > 0 && ev_p1 > 0, "both processors executed");
    $display("packets=%0d executables=%0d skips=%0d full=%0d/%0d queued=%0d qb_full_cycles=%0d p0=%0d p1=%0d",
             n_pkt, ev_exec, ev_skip, full0, full1, ev_q, qb_full_cyc, ev_p0, ev_p1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
