// tb_scale_proc: the 12-element array program "A[i] = X[i]*7; B[i] = A[i]+10"
// (the same program as tb_dataflow_computer) on two larger processor pools
// at once: one machine with 16 processors and one with 32, each with one
// instruction queue bank per processor. Everything else is at its default
// size. Both machines share the load port, the seed and the peek address
// and run in lock step from the same program.
//
// Program layout (block 7): 701..70C LK cells holding X[i] released by the
// seed from 7FF, 70D..718 MUL by 7, 719..724 ADD 10, 725..730 LK cells that
// collect B[i]. Every other cell is cleared first.
//
// Checks, per machine: every result packet against a reference (X, X*7,
// X*7+10 by originating address), the final B[i] held in 725..730, 24
// executables and 12 LK forwards, and that each processor executed: 24
// executables dealt round robin reach all 16 processors; with 32 the first
// 24 processors must each have executed one and the rest none.
// Follows the design: the program and the remark that the pool could hold
// 16 to 32 processors. Own choices: running both sizes side by side. Timing:
// the cycles from the seed to the last operand deposit are printed, not
// checked.
module tb_scale_proc;
  import dfc_pkg::*;

  localparam int N = 12;
  localparam int NP [2] = '{16, 32};

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load = 1'b0, init = 1'b0;
  logic [10:0] load_addr = '0, peek_addr = '0;
  logic [60:0] load_data = '0;

  int checks = 0, failures = 0, cyc = 0, t_seed = 0;
  int xval [N] = '{2, 3, 4, 5, 6, 7, 8, 7, 6, 5, 4, 3};

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam int P = NP[g];
    logic        rb_valid, qb_busy, iq_skip_event;
    logic [17:0] rb_msg;
    logic [24:0] peek_data;
    logic [7:0]  fire_exec_event, fire_msg_event, queued_event;
    logic [23:0] match_event;
    logic [P-1:0] bank_full, proc_exec_event;
    int n_add = 0, n_pkt = 0, n_bad = 0, ev_exec = 0, ev_msg = 0, ev_match = 0, t_last = 0;
    int ev_p [P] = '{default: 0};

    dataflow_computer #(.NPROC(P)) dut (.*);

    always @(posedge clk) if (rst_n) begin
      ev_exec  += $countones(fire_exec_event);
      ev_msg   += $countones(fire_msg_event);
      ev_match += $countones(match_event);
      if (match_event != '0) t_last = cyc;
      for (int p = 0; p < P; p++) if (proc_exec_event[p]) ev_p[p]++;
      if (rb_valid) begin
        int oa, v, exp;
        oa = int'(rb_msg[17:7]); v = int'(rb_msg[6:0]); t_last = cyc; n_pkt++;
        if (oa == 'h7FF)                     exp = 1;
        else if (oa >= 'h701 && oa <= 'h70C) exp = xval[oa - 'h701];
        else if (oa >= 'h70D && oa <= 'h718) exp = (xval[oa - 'h70D] * 7) % 128;
        else if (oa >= 'h719 && oa <= 'h724) begin exp = (xval[oa - 'h719] * 7 + 10) % 128; n_add++; end
        else                                 exp = -1;
        if (v != exp) begin n_bad++; $display("FAIL %0d processors: OA=%h value=%0d expected %0d", P, oa, v, exp); end
      end
    end
  end

  function automatic logic [60:0] mk_cell(
      input logic [10:0] d1a, input logic d1r, input logic [10:0] cad, input logic cr,
      input logic [6:0] opd2, input logic [6:0] opd1, input logic [3:0] op, input logic [1:0] lp,
      input logic d2o, input logic d1o, input logic can);
    return {12'd0, d1a, d1r, cad, cr, opd2, opd1, op, lp, 2'b00, d2o, d1o, can};
  endfunction

  task automatic put(input logic [10:0] a, input logic [60:0] d);
    @(negedge clk); load = 1'b1; load_addr = a; load_data = d;
    @(negedge clk); load = 1'b0;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2048; a++) put(11'(a), '0);
    for (int i = 0; i < N; i++) begin
      put(11'('h701 + i), mk_cell(0, 0, 11'h7FF, 1, 0, 7'(xval[i]), 4'b0000, 2'd3, 1, 1, 0));
      put(11'('h70D + i), mk_cell(11'('h701 + i), 1, 0, 0, 7, 0, 4'b0011, 2'd0, 1, 0, 1));
      put(11'('h719 + i), mk_cell(11'('h70D + i), 1, 0, 0, 10, 0, 4'b0001, 2'd0, 1, 0, 1));
      put(11'('h725 + i), mk_cell(11'('h719 + i), 1, 0, 0, 0, 0, 4'b0000, 2'd3, 0, 0, 0));
    end
    repeat (5) @(posedge clk);
    t_seed = cyc;
    init = 1'b1; repeat (2) @(posedge clk); init = 1'b0;
    wait (g_run[0].n_add == N && g_run[1].n_add == N && g_run[0].ev_match == 4*N && g_run[1].ev_match == 4*N);
    repeat (200) @(posedge clk);

    for (int i = 0; i < N; i++) begin
      peek_addr = 11'('h725 + i); #1;
      chk(g_run[0].peek_data[17:11] == 7'((xval[i] * 7 + 10) % 128) && g_run[0].peek_data[1], $sformatf("16: B[%0d]", i));
      chk(g_run[1].peek_data[17:11] == 7'((xval[i] * 7 + 10) % 128) && g_run[1].peek_data[1], $sformatf("32: B[%0d]", i));
    end
    chk(g_run[0].n_bad == 0 && g_run[0].n_pkt == 3*N + 1, $sformatf("16: packets %0d, wrong %0d", g_run[0].n_pkt, g_run[0].n_bad));
    chk(g_run[1].n_bad == 0 && g_run[1].n_pkt == 3*N + 1, $sformatf("32: packets %0d, wrong %0d", g_run[1].n_pkt, g_run[1].n_bad));
    chk(g_run[0].ev_exec == 2*N && g_run[0].ev_msg == N, "16: executables and forwards");
    chk(g_run[1].ev_exec == 2*N && g_run[1].ev_msg == N, "32: executables and forwards");
    for (int p = 0; p < 16; p++) chk(g_run[0].ev_p[p] > 0, $sformatf("16: processor %0d idle", p));
    for (int p = 0; p < 32; p++)
      chk(g_run[1].ev_p[p] == (p < 2*N ? 1 : 0), $sformatf("32: processor %0d executed %0d", p, g_run[1].ev_p[p]));
    $display("seed-to-last-deposit cycles: 16 processors %0d, 32 processors %0d",
             g_run[0].t_last - t_seed, g_run[1].t_last - t_seed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
