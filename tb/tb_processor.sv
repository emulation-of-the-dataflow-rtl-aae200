// tb_processor: one processor fed with 300 random executables covering
// every opcode (including undefined ones) with random operands. Each
// result packet is compared with a reference ALU written independently
// here, the execution time from taking the executable to requesting the
// result bus is checked (EXEC_CYCLES + 1 clock edges: 8 execution
// cycles), the result-bus grant is delayed randomly, and instr_done must
// pulse exactly once, right after the grant.
module tb_processor;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic instr_rd = 0, instr_done, res_req, res_grant = 0, exec_event;
  exec_t instr = '0;
  result_t res_msg;
  processor dut (.*);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int ref_alu(input int op, input int a, input int b);
    case (op)
      1: return ((a % 64) + (b % 64));
      2: return (a - b + 128) % 128;
      3: return ((a % 16) * (b % 8)) % 128;
      4: return (b == 0) ? 127 : a / b;
      8: return a == b;  9: return a != b;
      10: return a > b;  11: return a < b;
      12: return a >= b; 13: return a <= b;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, ndone, nev, ops[16];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int op, a, b, exp;
      op = (k < 16) ? k : $urandom_range(0, 15);
      a = $urandom_range(0, 127); b = $urandom_range(0, 127);
      if (k % 25 == 3) b = 0;
      if (k % 25 == 4) b = a;
      exp = ref_alu(op, a, b);
      ops[op]++;
      @(negedge clk);
      instr_rd = 1; instr = '{oa: 11'($urandom), opd2: 7'(b), opd1: 7'(a), op: 4'(op)};
      t0 = cyc; nev = 0;
      @(posedge clk); #1;
      while (!res_req) begin @(posedge clk); if (exec_event) nev++; #1; end
      chk(cyc - t0 == 9, $sformatf("execution took %0d edges", cyc - t0));
      chk(nev == 0 && exec_event, "exec_event with the result request");
      chk(res_msg.oa == instr.oa && int'(res_msg.value) == exp,
          $sformatf("op %0d %0d,%0d gave %0d expected %0d", op, a, b, res_msg.value, exp));
      repeat ($urandom_range(0, 4)) @(negedge clk);
      @(negedge clk); res_grant = 1;
      @(negedge clk); res_grant = 0;
      chk(instr_done && !res_req, "instr_done after grant");
      ndone = 0;
      @(posedge clk); #1;
      chk(!instr_done, "instr_done is one cycle");
      instr_rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
