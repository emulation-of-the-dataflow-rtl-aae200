// tb_bank_arbitrator: the bank arbitrator with three model banks. Each
// model bank raises busy at random and answers a write with an ack one to
// three cycles later. Checks, against a pointer tracked here: every
// executable is written to exactly one bank, with the right data; banks
// are visited in round-robin order starting from bank 0; a busy bank is
// skipped (with a skip_event) and the pointer moves on; the arbitrator is
// busy from input to ack; skips really occurred.
module tb_bank_arbitrator;
  import dfc_pkg::*;
  localparam int NB = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, busy, skip_event;
  exec_t in_exec = '0, bank_data;
  logic [NB-1:0] bank_wr, bank_busy = '0, bank_ack = '0;
  bank_arbitrator #(.NBANKS(NB)) dut (.*);

  int ptr = 0, nskip = 0, nwr = 0;
  bit waiting = 0;
  exec_t cur;
  int ack_cnt [NB] = '{default: -1};

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model banks and the reference pointer, evaluated on the outputs of
  // each clock edge
  always @(negedge clk) if (rst_n) begin
    bank_ack = '0;
    for (int b = 0; b < NB; b++) begin
      if (ack_cnt[b] == 0) bank_ack[b] = 1;
      if (ack_cnt[b] >= 0) ack_cnt[b]--;
    end
    if (skip_event) begin
      nskip++;
      ptr = (ptr + 1) % NB;
    end
    if (bank_wr != '0) begin
      nwr++;
      chk($onehot(bank_wr) && bank_wr[ptr], $sformatf("write to %b, expected bank %0d", bank_wr, ptr));
      chk(bank_data == cur, "bank data");
      ack_cnt[ptr] = $urandom_range(0, 2);
      waiting = 1;
    end
    if (waiting && bank_ack[ptr]) begin ptr = (ptr + 1) % NB; waiting = 0; end
    // banks change their busy state only while not being offered a write
    for (int b = 0; b < NB; b++) if (ack_cnt[b] < 0 && !bank_ack[b]) bank_busy[b] = ($urandom_range(0, 3) == 0);
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      while (busy) @(negedge clk);
      #1;
      in_valid = 1; in_exec = exec_t'($urandom); cur = in_exec;
      @(negedge clk); #1; in_valid = 0;
      chk(busy, "busy after input");
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(nwr == 400, $sformatf("writes %0d", nwr));
    chk(nskip > 20, $sformatf("skips %0d", nskip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
