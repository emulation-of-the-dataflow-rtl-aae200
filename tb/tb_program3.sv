// tb_program3: a high-fan-out program at the default machine size (8
// blocks, 2 processors), in the shape of the evaluation program
// "X[1] = 2*2; X[i] = X[i]*X[1] for the other elements; A[i] = A[i] + X[2]"
// with 27 instructions in block 7:
//   701        MUL 2*2, waiting only for the seed clause from 7FF
//   702..70E   13 MULs: immediate OPD1 = x[k], OPD2 from 701
//   70F..71B   13 ADDs: immediate OPD1 = a[k], OPD2 from 702
// One broadcast of 701's result fires 13 instructions in a single scan,
// and so does 702's result; this is the case the machine is good at.
// The x[k] and a[k] values are chosen here. Checks: every packet on the
// result bus against a reference (MUL takes OPD1[3:0] x OPD2[2:0], ADD is
// a 6-bit add with carry), the packet and executable counts, 27 matches,
// both processors used, and the queue buffer used. Prints the cycles from
// the seed to the last result.
module tb_program3;
  import dfc_pkg::*;
  localparam int N = 13;

  logic clk = 0, rst_n = 0;
  logic load = 0, init = 0;
  logic [10:0] load_addr = '0, peek_addr = '0;
  logic [60:0] load_data = '0;
  logic rb_valid, qb_busy, iq_skip_event;
  logic [17:0] rb_msg;
  logic [24:0] peek_data;
  logic [7:0] fire_exec_event, fire_msg_event, queued_event;
  logic [23:0] match_event;
  logic [1:0] bank_full, proc_exec_event;

  dataflow_computer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, t_seed = 0, t_last = 0;
  int n_x1 = 0, n_x = 0, n_a = 0, n_seed = 0, n_other = 0;
  int ev_exec = 0, ev_match = 0, ev_q = 0, ev_p0 = 0, ev_p1 = 0;
  int xv [N], av [N];

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic put(input int a, input cell_t c);
    @(negedge clk); load = 1; load_addr = 11'(a); load_data = c;
    @(negedge clk); load = 0;
  endtask
  function automatic cs1_t c1(input int op, input int opd1, input int opd2, input bit d2o, d1o, can);
    return '{opd2: 7'(opd2), opd1: 7'(opd1), op: 4'(op), lp: LP_NONE, d2u: 0, d1u: 0, d2o: d2o, d1o: d1o, can: can};
  endfunction
  function automatic int x_of(input int k);   // value of X at cell 702+k
    return (xv[k] % 16) * 4;                   // X[1] = 4, multiplier uses 3 bits of it
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    ev_exec  += $countones(fire_exec_event);
    ev_match += $countones(match_event);
    ev_q     += $countones(queued_event);
    if (proc_exec_event[0]) ev_p0++;
    if (proc_exec_event[1]) ev_p1++;
    if (rb_valid) begin
      int oa, v;
      oa = int'(rb_msg[17:7]); v = int'(rb_msg[6:0]); t_last = cyc;
      if (oa == 'h7FF) begin n_seed++; chk(v == 1, "seed"); end
      else if (oa == 'h701) begin n_x1++; chk(v == 4, "X[1] = 4"); end
      else if (oa >= 'h702 && oa <= 'h70E) begin
        n_x++; chk(v == x_of(oa - 'h702), $sformatf("X at %h = %0d", oa, v));
      end else if (oa >= 'h70F && oa <= 'h71B) begin
        n_a++; chk(v == (av[oa - 'h70F] % 64) + (x_of(0) % 64), $sformatf("A at %h = %0d", oa, v));
      end else n_other++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin xv[k] = 2 + k; av[k] = 5 * k + 1; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 2048; a++) put(a, '0);
    put('h701, '{cs4: '0, cs3: '0, cs2: '{addr: SEED_OA, req: 1}, cs1: c1(3, 2, 2, 1, 1, 0)});
    for (int k = 0; k < N; k++) begin
      put('h702 + k, '{cs4: '{addr: 11'h701, req: 1}, cs3: '0, cs2: '0, cs1: c1(3, xv[k], 0, 0, 1, 1)});
      put('h70F + k, '{cs4: '{addr: 11'h702, req: 1}, cs3: '0, cs2: '0, cs1: c1(1, av[k], 0, 0, 1, 1)});
    end
    @(negedge clk); t_seed = cyc; init = 1; @(negedge clk); init = 0;
    wait (n_a == N);
    repeat (3000) @(negedge clk);
    chk(n_seed == 1 && n_x1 == 1 && n_x == N && n_a == N && n_other == 0,
        $sformatf("packets seed=%0d x1=%0d x=%0d a=%0d other=%0d", n_seed, n_x1, n_x, n_a, n_other));
    chk(ev_exec == 1 + 2 * N, $sformatf("executables %0d", ev_exec));
    chk(ev_match == 1 + 2 * N, $sformatf("matches %0d", ev_match));
    chk(ev_p0 > 0 && ev_p1 > 0, "both processors used");
    chk(ev_q > 0, "queue buffer used");
    $display("seed-to-last-result cycles=%0d (%0d instructions), p0=%0d p1=%0d queued=%0d",
             t_last - t_seed, 1 + 2 * N, ev_p0, ev_p1, ev_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
