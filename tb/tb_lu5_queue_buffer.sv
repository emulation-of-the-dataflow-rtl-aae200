// tb_lu5_queue_buffer: LU5 and its queue buffer with a 4-word queue
// (capacity 3). A packet arriving while LU234 are idle goes straight
// through on the next edge; packets arriving while LU234 are busy are
// queued and later delivered in arrival order; a full queue raises busy,
// a packet arriving then is held and not lost; deliveries never come on
// consecutive cycles.
module tb_lu5_queue_buffer;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic rb_valid = 0, lu234_busy = 0, out_valid, busy, queued_event;
  result_t rb_msg = '0, out_msg;
  lu5_queue_buffer #(.Q_AW(2)) dut (.*);

  result_t got [$];
  int gott [$];
  int nq = 0;
  logic last_out = 0;
  always @(posedge clk) begin
    if (out_valid) begin got.push_back(out_msg); gott.push_back(cyc); end
    if (queued_event && rst_n) nq++;
    if (out_valid && last_out) begin failures++; $display("FAIL back-to-back delivery"); end
    last_out <= out_valid;
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic send(input int v);
    @(negedge clk); rb_valid = 1; rb_msg = '{oa: 11'(v + 'h100), value: 7'(v)};
    @(negedge clk); rb_valid = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    // straight through
    @(negedge clk); rb_valid = 1; rb_msg = '{oa: 11'h123, value: 7'd9}; t0 = cyc;
    @(negedge clk); rb_valid = 0;
    @(negedge clk);
    chk(got.size() == 1 && got[0] == '{oa: 11'h123, value: 7'd9}, "bypass delivery");
    chk(gott.size() == 1 && gott[0] - t0 == 2, $sformatf("bypass latency %0d", gott.size() ? gott[0] - t0 : -1));
    chk(nq == 0, "bypass does not queue");
    // LU234 busy: queue three, then the fourth is held
    lu234_busy = 1;
    for (int i = 1; i <= 3; i++) send(i);
    chk(nq == 3, $sformatf("three queued (%0d)", nq));
    chk(busy, "busy when full");
    send(4);
    chk(busy, "busy while holding");
    repeat (3) @(negedge clk);
    lu234_busy = 0;
    repeat (20) @(negedge clk);
    chk(got.size() == 5, $sformatf("all delivered (%0d)", got.size()));
    for (int i = 1; i < got.size(); i++) chk(got[i].value == 7'(i), $sformatf("order %0d", got[i].value));
    chk(!busy, "not busy after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
