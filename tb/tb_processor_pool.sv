// tb_processor_pool: a pool of three processors (execution time shortened
// to 4 cycles). Each processor gets its own stream of random ADD/SUB/MUL
// executables from a model bank; a model result bus grants one request at
// a time in rotating order. Checks: each result packet carries the right
// originating address and value, each processor's results come back in
// the order it was given work, instr_done follows each grant for exactly
// the granted processor, all three processors had results waiting for the
// bus at the same time at least once, and every processor finished its
// stream.
module tb_processor_pool;
  import dfc_pkg::*;
  localparam int NP = 3, PER = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NP-1:0] instr_rd = '0, instr_done, res_req, res_grant = '0, exec_events;
  exec_t   instr [NP];
  result_t res_msg [NP];
  processor_pool #(.NPROC(NP), .EXEC_CYCLES(4)) dut (.*);

  int issued [NP] = '{default: 0}, done [NP] = '{default: 0};
  int rr = 0, overlap = 0;
  logic [NP-1:0] last_grant = '0;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic exec_t mk(input int p, input int k);
    int a, b;
    a = (p * 37 + k * 11) % 128; b = (k * 5 + p) % 128;
    return '{oa: 11'(p * 256 + k), opd2: 7'(b), opd1: 7'(a), op: 4'(1 + k % 3)};
  endfunction
  function automatic int ref_val(input exec_t e);
    case (e.op)
      1: return (e.opd1 % 64) + (e.opd2 % 64);
      2: return (int'(e.opd1) - int'(e.opd2) + 128) % 128;
      default: return (e.opd1 % 16) * (e.opd2 % 8);
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (res_req == '1) overlap++;
      chk(instr_done == last_grant, $sformatf("instr_done %b after grant %b", instr_done, last_grant));
      for (int p = 0; p < NP; p++) begin
        // model bank: next executable at the head, removed on instr_done
        if (instr_done[p]) begin
          int v;
          done[p]++;
          issued[p]++;
        end
        instr_rd[p] = (issued[p] < PER);
        instr[p] = mk(p, issued[p]);
      end
      // model result bus
      res_grant = '0;
      for (int i = 0; i < NP; i++) begin
        int p;
        p = (rr + i) % NP;
        if (res_req[p] && res_grant == '0 && $urandom_range(0, 1)) begin
          exec_t e;
          e = mk(p, issued[p]);
          chk(res_msg[p].oa == e.oa && int'(res_msg[p].value) == ref_val(e),
              $sformatf("proc %0d item %0d value %0d expected %0d", p, issued[p], res_msg[p].value, ref_val(e)));
          res_grant[p] = 1'b1;
          rr = (p + 1) % NP;
        end
      end
      last_grant = res_grant;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (done[0] == PER && done[1] == PER && done[2] == PER);
    repeat (5) @(negedge clk);
    chk(overlap > 0, "three processors finished together and waited for the bus");
    for (int p = 0; p < NP; p++) chk(done[p] == PER, $sformatf("proc %0d finished %0d", p, done[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
