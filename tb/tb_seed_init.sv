// tb_seed_init: a rising edge of init raises exactly one request carrying
// the seed packet {OA = 7FF, value = 1}; the grant clears it; holding init
// high does not repeat it; a second edge gives a second seed.
module tb_seed_init;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init = 0, grant = 0, req;
  result_t msg;
  seed_init dut (.*);
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(!req, "no request before init");
    init = 1; @(negedge clk);
    chk(req, "request after init edge");
    chk(msg == 18'b111111111110000001, "seed packet 7FF/1");
    repeat (3) @(negedge clk); chk(req, "request held until grant");
    grant = 1; @(negedge clk); grant = 0;
    chk(!req, "request cleared by grant");
    repeat (5) @(negedge clk); chk(!req, "no repeat while init stays high");
    init = 0; @(negedge clk); init = 1; @(negedge clk);
    chk(req, "second edge, second seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
