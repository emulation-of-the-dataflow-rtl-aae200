// tb_circ_queue: checks the circular queue against a reference queue.
// Random pushes and pops on a 16-word queue (capacity 15): order of data,
// empty when the pointers meet, full at exactly 15 entries, no write when
// full and no pointer move when empty pops. Then the 256-word default.
module tb_circ_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push, pop, empty, full;
  logic [17:0] din, dout;
  logic [3:0] wp, rp;
  circ_queue #(.D_WIDTH(18), .A_WIDTH(4)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .wr_ptr(wp), .rd_ptr(rp));

  logic p2, q2, e2, f2;
  logic [17:0] d2, o2;
  logic [7:0] w2, r2;
  circ_queue dut_big (.clk, .rst_n, .push(p2), .din(d2), .pop(q2), .dout(o2), .empty(e2), .full(f2), .wr_ptr(w2), .rd_ptr(r2));

  logic [17:0] model [$];

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0; p2 = 0; q2 = 0; d2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(empty && !full, "empty after reset");
    // fill to capacity
    for (int i = 0; i < 16; i++) begin
      push = 1; din = 18'(i * 37 + 5);
      @(posedge clk); #1;
      if (i < 15) model.push_back(18'(i * 37 + 5));
      @(negedge clk);
    end
    push = 0;
    chk(full, "full after 15 pushes");
    chk(model.size() == 15, "model size");
    chk(wp == 4'(rp - 1), "full rule NILP == NIEP-1");
    // random traffic
    for (int n = 0; n < 400; n++) begin
      push = 1'($urandom_range(0, 1)); pop = 1'($urandom_range(0, 1)); din = 18'($urandom);
      #1;
      if (pop && !empty) begin
        chk(model.size() > 0 && dout == model[0], $sformatf("head %h", dout));
      end
      if (pop && !empty) void'(model.pop_front());
      if (push && !full) model.push_back(din);
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == 15), "full flag");
    end
    push = 0; pop = 0;
    // default size: 255 usable entries
    for (int i = 0; i < 256; i++) begin p2 = 1; d2 = 18'(i); @(negedge clk); end
    p2 = 0;
    chk(f2, "256-word queue full at 255");
    chk(o2 == 18'd0, "256-word queue head");
    chk(w2 == 8'd255, "255 entries written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
