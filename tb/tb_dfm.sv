// tb_dfm: the Dataflow Memory with two blocks (compare time shortened to
// 1 cycle per cell); the test bench plays the instruction queue and the
// processors.
// Part 1, result bus priority: with every cell cleared, processor 1,
// processor 0 and the seed source request the bus in the same cycle; the
// packets must appear in the order processor 0, processor 1, seed, with at
// least the service time between them.
// Part 2, a program across both blocks:
//   005 (block 0) ADD, OPD1 from the seed 7FF, immediate OPD2 = 2
//   105 (block 1) LK holding OPD2, clause preset, OPD1 from 005
// The seed must make 005 fire ADD(1,2) on the instruction bus; the bus is
// held busy for a while and the executable must wait. The test bench then
// returns {005, 3} as processor 0; block 1 must forward {105, 3}. Load
// address decoding is checked by reading cells back through peek.
module tb_dfm;
  import dfc_pkg::*;
  localparam int NB = 2, NP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic load = 0, init = 0, exec_valid, iq_busy = 0, rb_valid, qb_busy;
  addr_t load_addr = '0, peek_addr = '0;
  cell_t load_data = '0;
  logic [NP-1:0] proc_req = '0, proc_grant;
  result_t proc_msg [NP] = '{default: '0};
  exec_t exec;
  result_t rb_msg;
  cs1_t peek_data;
  logic [NB-1:0] fire_exec_events, fire_msg_events, queued_events;
  logic [3*NB-1:0] match_events;
  dfm #(.NBLOCKS(NB), .NPROC(NP), .CYCLES_PER_CELL(1)) dut (.*);

  result_t bus [$];
  int bus_t [$];
  exec_t xs [$];
  int nfx = 0, nfm = 0;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic put(input int a, input cell_t c);
    @(negedge clk); load = 1; load_addr = 11'(a); load_data = c;
    @(negedge clk); load = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rb_valid) begin bus.push_back(rb_msg); bus_t.push_back(cyc); end
    if (exec_valid) xs.push_back(exec);
    nfx += $countones(fire_exec_events);
    nfm += $countones(fire_msg_events);
    chk(!(exec_valid && iq_busy), "instruction bus used while queue busy");
  end
  // processors drop their request once granted
  always @(negedge clk) for (int p = 0; p < NP; p++) if (proc_grant[p]) proc_req[p] = 0;

  initial begin
    cs1_t c1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256 * NB; a++) put(a, '0);
    // part 1
    @(negedge clk);
    proc_req = 2'b11;
    proc_msg[0] = '{oa: 11'h050, value: 7'd10};
    proc_msg[1] = '{oa: 11'h051, value: 7'd11};
    init = 1;
    @(negedge clk); init = 0;
    while (proc_req != 0 || bus.size() < 3) @(negedge clk);
    repeat (600) @(negedge clk);
    chk(bus.size() == 3, $sformatf("%0d packets", bus.size()));
    chk(bus[0].oa == 11'h050 && bus[1].oa == 11'h051 && bus[2] == '{oa: SEED_OA, value: 7'd1}, "priority p0, p1, seed");
    chk(bus_t[1] - bus_t[0] >= 7 && bus_t[2] - bus_t[1] >= 7, "service spacing");
    bus.delete(); bus_t.delete();
    // part 2
    c1 = '{opd2: 7'd2, opd1: 0, op: 4'd1, lp: LP_NONE, d2u: 0, d1u: 0, d2o: 1, d1o: 0, can: 1};
    put('h005, '{cs4: '0, cs3: '{addr: SEED_OA, req: 1}, cs2: '0, cs1: c1});
    c1 = '{opd2: 7'd0, opd1: 0, op: 4'd0, lp: LP_LK, d2u: 0, d1u: 0, d2o: 1, d1o: 0, can: 1};
    put('h105, '{cs4: '0, cs3: '{addr: 11'h005, req: 1}, cs2: '0, cs1: c1});
    peek_addr = 11'h105; #1;
    chk(peek_data.lp == LP_LK && peek_data.d2o, "block 1 cell written");
    peek_addr = 11'h005; #1;
    chk(peek_data.op == 4'd1 && peek_data.opd2 == 2, "block 0 cell written");
    iq_busy = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    repeat (400) @(negedge clk);
    chk(xs.size() == 0 && nfx == 0, "executable waits while queue busy");
    iq_busy = 0;
    repeat (5) @(negedge clk);
    chk(xs.size() == 1 && xs[0] == '{oa: 11'h005, opd2: 7'd2, opd1: 7'd1, op: 4'd1}, "ADD(1,2)@005 on instruction bus");
    proc_msg[0] = '{oa: 11'h005, value: 7'd3}; proc_req[0] = 1;
    repeat (700) @(negedge clk);
    chk(bus.size() == 3 && bus[2] == '{oa: 11'h105, value: 7'd3}, "block 1 forwards {105,3}");
    chk(nfx == 1 && nfm == 1, $sformatf("fires %0d forwards %0d", nfx, nfm));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
