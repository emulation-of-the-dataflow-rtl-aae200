// tb_program1: the loop program "x = y*9 - 15; if x != 0 { F1 = 0; F2 = 1;
// for i = 1 to x: F1 = F1 + x*(i+2); while x > 1: F2 = F2*x; x = x-1 }"
// with y = 2, at the default machine size. Expected: x = 3, F1 = 36,
// F2 = 6. The sixteen cells sit at 701..710 (A..P):
//   A 701 LK   holds y = 2, released by the seed clause from 7FF
//   B 702 MUL  9 * y   (immediate 9 in OPD1: the multiplier takes
//              OPD1[3:0] x OPD2[2:0], so 9 has to be the 4-bit side)
//   C 703 SUB  B - 15               -> x
//   D 704 CNE  x != 0               -> clause of E, F, G, M, N
//   E 705 ADD  0 + 1, on D          -> first i
//   F 706 SP   i from E, later from L (FOR loop entry)
//   G 707 CLE  i <= x, LP=2, x reused
//   H 708 ADD  i + 2, clause G
//   I 709 MUL  (i+2) * x, clause G
//   J 70A ADD  I + F1, F1 = its own previous result (starts at 0)
//   K 70B LK   passes i on only after J has produced F1 (iteration lock)
//   L 70C ADD  i + 1, back to F
//   M 70D SP   x from C, later from P (WHILE loop entry)
//   N 70E CGT  x > 1, LP=2
//   O 70F MUL  x * F2, F2 = its own previous result (starts at 1)
//   P 710 SUB  x - 1, back to M
// The two loops run at the same time. Checks: every result packet against
// the expected sequence for its cell, F1 = 36 left in J and F2 = 6 left in
// O, 38 packets besides the seed, SP and LK forwarding and operand reuse.
// Prints the cycle count from the seed to the last packet.
// Follows the design: the program itself, the loop structure (SP entries,
// LP=2 conditionals, the LK lock between FOR iterations) and the opcodes.
// Own choices: the cell addresses, y held in an LK cell released by the
// seed, the position of the constant 9, and J and O taking their second
// operand from their own result. Every cell is cleared before loading.
// Timing: only the end result and packet order per cell are checked; the
// interleaving of the two loops is left free.
module tb_program1;
  import dfc_pkg::*;

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

  localparam int A = 'h701, B = 'h702, C = 'h703, D = 'h704, E = 'h705, F = 'h706, G = 'h707, H = 'h708;
  localparam int I = 'h709, J = 'h70A, K = 'h70B, L = 'h70C, M = 'h70D, N = 'h70E, O = 'h70F, P = 'h710;

  int checks = 0, failures = 0, cyc = 0, t_seed = 0, t_last = 0, n_pkt = 0, ev_msg = 0, ev_exec = 0;
  int expq [int][$];

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

  always @(posedge clk) if (rst_n) begin
    cyc++;
    ev_msg  += $countones(fire_msg_event);
    ev_exec += $countones(fire_exec_event);
    if (rb_valid) begin
      int oa, v;
      oa = int'(rb_msg[17:7]); v = int'(rb_msg[6:0]); t_last = cyc;
      if (oa == 'h7FF) chk(v == 1, "seed");
      else begin
        n_pkt++;
        if (!expq.exists(oa) || expq[oa].size() == 0) chk(0, $sformatf("unexpected packet %h = %0d", oa, v));
        else begin
          chk(expq[oa][0] == v, $sformatf("cell %h gave %0d, expected %0d", oa, v, expq[oa][0]));
          void'(expq[oa].pop_front());
        end
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int left;
    expq[A] = '{2};  expq[B] = '{18}; expq[C] = '{3}; expq[D] = '{1}; expq[E] = '{1};
    expq[F] = '{1, 2, 3, 4}; expq[G] = '{1, 1, 1, 0}; expq[H] = '{3, 4, 5};
    expq[I] = '{9, 12, 15};  expq[J] = '{9, 21, 36};  expq[K] = '{1, 2, 3}; expq[L] = '{2, 3, 4};
    expq[M] = '{3, 2, 1};    expq[N] = '{1, 1, 0};    expq[O] = '{3, 6};    expq[P] = '{2, 1};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 2048; a++) put(a, '0);
    //          CS4 (D2A)      CS3 (D1A)   CS2 (CAD)     CS1: op lp opd1 opd2 d2u d1u d2o d1o can
    put(A, '{cs4: '0,     cs3: '0,     cs2: src('h7FF), cs1: c1(0,  3, 2, 0,  0, 0, 1, 1, 0)});
    put(B, '{cs4: src(A), cs3: '0,     cs2: '0,         cs1: c1(3,  0, 9, 0,  0, 0, 0, 1, 1)});
    put(C, '{cs4: '0,     cs3: src(B), cs2: '0,         cs1: c1(2,  0, 0, 15, 0, 0, 1, 0, 1)});
    put(D, '{cs4: '0,     cs3: src(C), cs2: '0,         cs1: c1(9,  0, 0, 0,  0, 0, 1, 0, 1)});
    put(E, '{cs4: '0,     cs3: '0,     cs2: src(D),     cs1: c1(1,  0, 0, 1,  0, 0, 1, 1, 0)});
    put(F, '{cs4: src(L), cs3: src(E), cs2: src(D),     cs1: c1(0,  1, 0, 0,  0, 0, 0, 0, 0)});
    put(G, '{cs4: src(C), cs3: src(F), cs2: src(D),     cs1: c1(13, 2, 0, 0,  1, 0, 0, 0, 0)});
    put(H, '{cs4: '0,     cs3: src(F), cs2: src(G),     cs1: c1(1,  0, 0, 2,  1, 0, 1, 0, 0)});
    put(I, '{cs4: src(C), cs3: src(H), cs2: src(G),     cs1: c1(3,  0, 0, 0,  1, 0, 0, 0, 0)});
    put(J, '{cs4: src(J), cs3: src(I), cs2: src(G),     cs1: c1(1,  0, 0, 0,  0, 0, 1, 0, 0)});
    put(K, '{cs4: src(J), cs3: src(F), cs2: src(G),     cs1: c1(0,  3, 0, 0,  0, 0, 0, 0, 0)});
    put(L, '{cs4: '0,     cs3: src(K), cs2: src(G),     cs1: c1(1,  0, 0, 1,  1, 0, 1, 0, 0)});
    put(M, '{cs4: src(P), cs3: src(C), cs2: src(D),     cs1: c1(0,  1, 0, 0,  0, 0, 0, 0, 0)});
    put(N, '{cs4: '0,     cs3: src(M), cs2: src(D),     cs1: c1(10, 2, 0, 1,  1, 0, 1, 0, 0)});
    put(O, '{cs4: src(O), cs3: src(M), cs2: src(N),     cs1: c1(3,  0, 0, 1,  0, 0, 1, 0, 0)});
    put(P, '{cs4: '0,     cs3: src(M), cs2: src(N),     cs1: c1(2,  0, 0, 1,  1, 0, 1, 0, 0)});
    @(negedge clk); t_seed = cyc; init = 1; @(negedge clk); init = 0;
    wait (n_pkt == 38);
    repeat (20000) @(negedge clk);
    left = 0; foreach (expq[a]) left += expq[a].size();
    chk(left == 0, $sformatf("%0d expected packets missing", left));
    chk(n_pkt == 38, $sformatf("packets %0d", n_pkt));
    peek_addr = 11'(J); #1; chk(peek_data[24:18] == 7'd36 && peek_data[2], "F1 = 36 held in J");
    peek_addr = 11'(O); #1; chk(peek_data[24:18] == 7'd6 && peek_data[2], "F2 = 6 held in O");
    peek_addr = 11'(G); #1; chk(peek_data[24:18] == 7'd3 && peek_data[2], "G kept x (reuse)");
    chk(ev_msg == 1 + 4 + 3 + 3, $sformatf("SP/LK forwards %0d", ev_msg));
    chk(ev_exec == 38 - 11, $sformatf("executables %0d", ev_exec));
    $display("seed-to-last-packet cycles=%0d, packets=%0d, executables=%0d, forwards=%0d",
             t_last - t_seed, n_pkt, ev_exec, ev_msg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
