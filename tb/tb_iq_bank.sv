// tb_iq_bank: one instruction-queue bank with a 4-word ring (3 usable),
// so it fills often. A writer offers random executables whenever the bank
// is not busy, a reader pops the head at random times. Checks: data comes
// out in write order, every write gets exactly one ack, busy covers the
// pending write and the full ring, the ring really filled (busy with
// ring full), NILP/NIEP move by one per write/execute, and
// instr_rd is high exactly when the ring holds data.
module tb_iq_bank;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, busy, ack, instr_rd, instr_done = 0;
  exec_t wr_data = '0, instr;
  logic [1:0] nilp, niep;
  iq_bank #(.A_WIDTH(2)) dut (.*);

  exec_t model [$];
  int nwr = 0, nack = 0, nrd = 0, nfull = 0, occ = 0;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // occupancy model: a word enters the ring one cycle after wr_en
  always @(posedge clk) if (rst_n) begin
    if (ack) nack++;
    if (nilp == niep - 2'd1) nfull++;
  end

  initial begin
    logic [1:0] lp, ep;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!instr_rd && !busy && nilp == 0 && niep == 0, "empty after reset");
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      lp = nilp; ep = niep;
      chk(instr_rd == (nilp != niep), "instr_rd equals not empty");
      // busy covers a full ring and any write not yet acknowledged
      if (nilp == niep - 2'd1) chk(busy, "busy when full");
      if (nwr == nack && nilp != niep - 2'd1) chk(!busy, "idle when not full and nothing pending");
      if (busy) chk(nwr != nack || nilp == niep - 2'd1, "busy only for a pending write or a full ring");
      wr_en = 0; instr_done = 0;
      if (!busy && $urandom_range(0, 2) != 0) begin
        wr_en = 1; wr_data = exec_t'($urandom); model.push_back(wr_data); nwr++;
      end
      if (instr_rd && $urandom_range(0, 3) == 0) begin
        instr_done = 1;
        chk(model.size() > 0 && instr == model[0], "head in write order");
        void'(model.pop_front()); nrd++;
      end
      @(posedge clk); #1;
      if (instr_done) chk(niep == ep + 2'd1, "NIEP advanced");
    end
    wr_en = 0; instr_done = 0;
    repeat (4) @(negedge clk);
    chk(nack == nwr, $sformatf("acks %0d writes %0d", nack, nwr));
    chk(nfull > 0, "ring filled");
    chk(nrd > 100, "reads happened");
    chk(nilp == 2'(nwr) && niep == 2'(nrd), "NILP/NIEP count writes/executes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
