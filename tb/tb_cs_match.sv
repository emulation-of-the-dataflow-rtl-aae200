// tb_cs_match: one matching cell section (configured as LU3, operand 1) in
// block 5 with the design's 5 cycles per cell. A packet that matches no
// cell keeps the section busy for exactly 254*5 cycles plus the accept
// cycle; a packet that matches cells 3, 100 and 254 produces three tokens
// {5xx cell address, value, type 01} in cell order; a cell whose required
// flag is clear is not matched even if its address is equal.
module tb_cs_match;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic load_en = 0, in_valid = 0, busy, tok_req, tok_grant = 0, match_event;
  logic [7:0] load_idx = 0;
  csx_t load_data = '0;
  result_t in_msg = '0;
  token_t tok;
  cs_match #(.TTYPE(TT_OPD1), .BLOCK_ADDR(3'd5)) dut (.*);

  token_t toks [$];
  // simple grant model: grant two cycles after a request
  int wait_cnt = 0;
  always @(posedge clk) begin
    tok_grant <= 1'b0;
    if (tok_req && !tok_grant) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt == 2) begin tok_grant <= 1'b1; toks.push_back(tok); wait_cnt <= 0; end
    end
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      load_en = 1; load_idx = 8'(i);
      load_data = '{addr: 11'(i), req: 1'b1};
      if (i == 3 || i == 100 || i == 254) load_data = '{addr: 11'h3AB, req: 1'b1};
      if (i == 50) load_data = '{addr: 11'h3AB, req: 1'b0};
      if (i == 0 || i == 255) load_data = '{addr: 11'h3AB, req: 1'b1};  // never scanned
      @(negedge clk);
    end
    load_en = 0;
    // no match: 0x7FE is held by no cell
    in_valid = 1; in_msg = '{oa: 11'h7FE, value: 7'd1}; t0 = cyc;
    @(negedge clk); in_valid = 0;
    wait (!busy); t1 = cyc;
    chk(t1 - t0 == 254 * 5 + 1, $sformatf("no-match walk %0d cycles", t1 - t0));
    chk(toks.size() == 0, "no tokens");
    @(negedge clk);
    in_valid = 1; in_msg = '{oa: 11'h3AB, value: 7'd77};
    @(negedge clk); in_valid = 0;
    wait (!busy);
    chk(toks.size() == 3, $sformatf("three tokens (%0d)", toks.size()));
    if (toks.size() == 3) begin
      chk(toks[0] == '{caddr: 11'h503, value: 7'd77, ttype: TT_OPD1}, "token cell 3");
      chk(toks[1] == '{caddr: 11'h564, value: 7'd77, ttype: TT_OPD1}, "token cell 100");
      chk(toks[2] == '{caddr: 11'h5FE, value: 7'd77, ttype: TT_OPD1}, "token cell 254");
    end
    // a match on cell 17 (address 17)
    @(negedge clk);
    in_valid = 1; in_msg = '{oa: 11'd17, value: 7'd5};
    @(negedge clk); in_valid = 0;
    wait (!busy);
    chk(toks.size() == 4 && toks[3].caddr == 11'h511, "own-address match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
