// tb_instruction_queue: the instruction queue with two banks of 4 words
// (3 usable each). A writer offers numbered executables whenever the queue
// is not busy; two readers, standing in for processors, take the heads of
// their banks at random and different rates so the banks fill unevenly.
// Checks: every executable comes out exactly once and unchanged; each
// bank hands out its executables in the order they were written; both
// banks are used; a full bank was seen and skipped (skip_event).
module tb_instruction_queue;
  import dfc_pkg::*;
  localparam int NB = 2, N = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, busy, skip_event;
  exec_t in_exec = '0;
  logic [NB-1:0] instr_rd, instr_done = '0, bank_full;
  exec_t instr [NB];
  instruction_queue #(.NBANKS(NB), .BANK_AW(2)) dut (.*);

  bit seen [N];
  int last [NB] = '{-1, -1};
  int nout = 0, nskip = 0, nfull = 0;
  int per_bank [NB];

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (skip_event) nskip++;
    if (bank_full != '0) nfull++;
  end

  // readers: bank 0 is slow, bank 1 faster
  always @(negedge clk) begin
    instr_done <= '0;
    if (rst_n) for (int b = 0; b < NB; b++) begin
      if (instr_rd[b] && !instr_done[b] && $urandom_range(0, b == 0 ? 12 : 3) == 0) begin
        int id;
        id = int'(instr[b].oa);
        chk(id < N && !seen[id], $sformatf("bank %0d gave id %0d twice or bad", b, id));
        chk(id > last[b], $sformatf("bank %0d out of order", b));
        chk(instr[b].opd1 == 7'(id * 3) && instr[b].opd2 == 7'(id) && instr[b].op == 4'(id), "payload");
        if (id < N) seen[id] = 1;
        last[b] = id; per_bank[b]++; nout++;
        instr_done[b] <= 1'b1;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while (busy) @(negedge clk);
      in_valid = 1; in_exec = '{oa: 11'(k), opd2: 7'(k), opd1: 7'(k * 3), op: 4'(k)};
      @(negedge clk); in_valid = 0;
    end
    while (nout < N) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(nout == N, "all executables delivered");
    chk(per_bank[0] > 0 && per_bank[1] > 0, $sformatf("bank use %0d/%0d", per_bank[0], per_bank[1]));
    chk(nskip > 0, "full bank skipped");
    chk(nfull > 0, "bank_full seen");
    $display("bank0=%0d bank1=%0d skips=%0d", per_bank[0], per_bank[1], nskip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
