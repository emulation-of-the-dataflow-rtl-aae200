// tb_dataflow_computer: end-to-end test of the whole machine at its
// default size (8 DFM blocks, 2 processors), running the array program
// "A[i] = X[i]*7; B[i] = A[i]+10" for 12 elements.
//
// Program layout (block 7, addresses 701..730 hex):
//   701..70C  LK cells holding X[i] (both operands present), waiting for the
//             seed clause from 7FF; they forward X[i] as their own result
//   70D..718  MUL cells: OPD1 from 701+i, immediate OPD2 = 7
//   719..724  ADD cells: OPD1 from 70D+i, immediate OPD2 = 10
//   725..730  LK placeholders that only collect B[i] in OPD1
// Every other cell of all eight blocks is written with zero first.
//
// Checks: every result packet on the result bus against a reference
// computed here (X*7 from 70D+i, X*7+10 from 719+i, X from 701+i); the
// final OPD1/D1O of 725..730; the count of each kind of packet; that both
// processors executed; that the seed fanned out to 12 cells, that results
// were queued in a queue buffer, and that SP/LK-style forwarding
// happened. The cycle count from the seed to the last deposit is printed.
module tb_dataflow_computer;
  import dfc_pkg::*;

  localparam int N = 12;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [10:0] load_addr = '0;
  logic [60:0] load_data = '0;
  logic        init = 1'b0;
  logic        rb_valid;
  logic [17:0] rb_msg;
  logic [10:0] peek_addr = '0;
  logic [24:0] peek_data;
  logic [7:0]  fire_exec_event, fire_msg_event, queued_event;
  logic [23:0] match_event;
  logic        qb_busy;
  logic        iq_skip_event;
  logic [1:0]  bank_full, proc_exec_event;

  dataflow_computer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0, n_lk = 0, n_seed = 0, n_other = 0;
  int ev_exec = 0, ev_msg = 0, ev_match = 0, ev_queued = 0, ev_p0 = 0, ev_p1 = 0, ev_skip = 0;
  int cyc = 0, t_seed = 0, t_last = 0;
  int xval [N] = '{2, 3, 4, 5, 6, 7, 8, 7, 6, 5, 4, 3};

  function automatic logic [60:0] mk_cell(
      input logic [10:0] d2a, input logic d2r, input logic [10:0] d1a, input logic d1r,
      input logic [10:0] cad, input logic cr, input logic [6:0] opd2, input logic [6:0] opd1,
      input logic [3:0] op, input logic [1:0] lp, input logic d2u, input logic d1u,
      input logic d2o, input logic d1o, input logic can);
    return {d2a, d2r, d1a, d1r, cad, cr, opd2, opd1, op, lp, d2u, d1u, d2o, d1o, can};
  endfunction

  task automatic put(input logic [10:0] a, input logic [60:0] d);
    @(negedge clk);
    load = 1'b1; load_addr = a; load_data = d;
    @(negedge clk);
    load = 1'b0;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      ev_exec   += $countones(fire_exec_event);
      ev_msg    += $countones(fire_msg_event);
      ev_queued += $countones(queued_event);
      if (match_event != '0) begin ev_match += $countones(match_event); t_last = cyc; end
      if (proc_exec_event[0]) ev_p0++;
      if (proc_exec_event[1]) ev_p1++;
      if (iq_skip_event)   ev_skip++;
    end
  end

  // result bus monitor with an independent reference
  always @(posedge clk) begin
    if (rst_n && rb_valid) begin
      int oa, v, exp;
      oa = int'(rb_msg[17:7]);
      v  = int'(rb_msg[6:0]);
      t_last = cyc;
      checks++;
      if (oa == 'h7FF) begin
        n_seed++; exp = 1;
      end else if (oa >= 'h701 && oa <= 'h70C) begin
        n_lk++;  exp = xval[oa - 'h701];
      end else if (oa >= 'h70D && oa <= 'h718) begin
        n_mul++; exp = (xval[oa - 'h70D] * 7) % 128;
      end else if (oa >= 'h719 && oa <= 'h724) begin
        n_add++; exp = (xval[oa - 'h719] * 7 + 10) % 128;
      end else begin
        n_other++; exp = -1;
      end
      if (v != exp) begin
        failures++;
        $display("FAIL result OA=%h value=%0d expected %0d", oa, v, exp);
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // clear every cell of every block
    for (int a = 0; a < 2048; a++) put(11'(a), '0);
    for (int i = 0; i < N; i++) begin
      put(11'('h701 + i), mk_cell(0, 0, 0, 0, 11'h7FF, 1, 0, 7'(xval[i]), 4'b0000, 2'd3, 0, 0, 1, 1, 0));
      put(11'('h70D + i), mk_cell(0, 0, 11'('h701 + i), 1, 0, 0, 7, 0, 4'b0011, 2'd0, 0, 0, 1, 0, 1));
      put(11'('h719 + i), mk_cell(0, 0, 11'('h70D + i), 1, 0, 0, 10, 0, 4'b0001, 2'd0, 0, 0, 1, 0, 1));
      put(11'('h725 + i), mk_cell(0, 0, 11'('h719 + i), 1, 0, 0, 0, 0, 4'b0000, 2'd3, 0, 0, 0, 0, 0));
    end
    repeat (5) @(posedge clk);
    t_seed = cyc;
    init = 1'b1;
    repeat (2) @(posedge clk);
    init = 1'b0;
    // wait until every ADD result has been broadcast and the machine is quiet
    wait (n_add == N && ev_match == 4*N);
    repeat (200) @(posedge clk);

    for (int i = 0; i < N; i++) begin
      peek_addr = 11'('h725 + i);
      #1;
      checks++;
      if (peek_data[17:11] != 7'((xval[i] * 7 + 10) % 128) || peek_data[1] != 1'b1) begin
        failures++;
        $display("FAIL B[%0d] cell %h holds %0d (D1O=%b)", i, peek_addr, peek_data[17:11], peek_data[1]);
      end
    end
    // counts of each packet kind
    checks++; if (n_seed != 1)  begin failures++; $display("FAIL seeds %0d", n_seed); end
    checks++; if (n_lk   != N)  begin failures++; $display("FAIL LK packets %0d", n_lk); end
    checks++; if (n_mul  != N)  begin failures++; $display("FAIL MUL packets %0d", n_mul); end
    checks++; if (n_add  != N)  begin failures++; $display("FAIL ADD packets %0d", n_add); end
    checks++; if (n_other != 0) begin failures++; $display("FAIL stray packets %0d", n_other); end
    checks++; if (ev_exec != 2*N) begin failures++; $display("FAIL executables %0d", ev_exec); end
    // mechanisms
    checks++; if (ev_msg != N)  begin failures++; $display("FAIL LK forwards %0d", ev_msg); end
    checks++; if (ev_queued == 0) begin failures++; $display("FAIL queue buffer never used"); end
    checks++; if (ev_p0 == 0 || ev_p1 == 0) begin failures++; $display("FAIL processor idle p0=%0d p1=%0d", ev_p0, ev_p1); end
    checks++; if (ev_match < 4*N) begin failures++; $display("FAIL matches %0d", ev_match); end
    $display("seed-to-last-deposit cycles=%0d, executables=%0d, LK forwards=%0d, matches=%0d, queued=%0d, p0=%0d p1=%0d, bank skips=%0d",
             t_last - t_seed, ev_exec, ev_msg, ev_match, ev_queued, ev_p0, ev_p1, ev_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
