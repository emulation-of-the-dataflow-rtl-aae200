// tb_bus_controller: checks the fixed-priority bus controller as used for
// the result bus (4 requesters, 6-cycle service) and as the LU234 bus
// (3 requesters, 7-cycle service): lowest index wins, the winner's data
// appears on the bus together with its grant, a request raised after an
// edge is granted on the next edge (permission in the 2nd cycle), two
// grants are SERVICE+1 cycles apart, and busy holds grants off.
module tb_bus_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic [3:0] req, grant;
  logic [17:0] data [4];
  logic busy, bv;
  logic [17:0] bd;
  bus_controller #(.NREQ(4), .W(18), .SERVICE_CYCLES(6)) dut (.clk, .rst_n, .req, .data, .busy, .grant, .bus_valid(bv), .bus_data(bd));

  logic [2:0] req3, grant3;
  logic [19:0] data3 [3];
  logic bv3;
  logic [19:0] bd3;
  bus_controller #(.NREQ(3), .W(20), .SERVICE_CYCLES(7)) dut3 (.clk, .rst_n, .req(req3), .data(data3), .busy(1'b0), .grant(grant3), .bus_valid(bv3), .bus_data(bd3));

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int order [$];
  int gtime [$];
  int g3time [$];
  int g3order [$];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (grant[i]) begin
      order.push_back(i); gtime.push_back(cyc);
      checks++; if (!(bv && bd == data[i])) begin failures++; $display("FAIL bus data for %0d", i); end
    end
    for (int i = 0; i < 3; i++) if (grant3[i]) begin
      g3order.push_back(i); g3time.push_back(cyc);
      checks++; if (!(bv3 && bd3 == data3[i])) begin failures++; $display("FAIL lu234 bus data %0d", i); end
    end
  end
  // requesters drop their request on their grant
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (grant[i]) req[i] <= 1'b0;
    for (int i = 0; i < 3; i++) if (grant3[i]) req3[i] <= 1'b0;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    req = 0; req3 = 0; busy = 0;
    for (int i = 0; i < 4; i++) data[i] = 18'(i * 1000 + 7);
    for (int i = 0; i < 3; i++) data3[i] = 20'(i * 3000 + 11);
    repeat (2) @(negedge clk); rst_n = 1;
    // single request: grant is visible in the second cycle of the request
    @(posedge clk); #1; req[2] = 1; t0 = cyc;
    wait (order.size() == 1);
    chk(order[0] == 2, "single request winner");
    chk(gtime[0] - t0 == 2, $sformatf("grant latency %0d", gtime[0] - t0));
    repeat (10) @(posedge clk);
    // all four at once, held off by busy first
    #1; busy = 1; req = 4'b1111; req3 = 3'b111;
    repeat (5) @(posedge clk);
    chk(order.size() == 1, "busy holds off grants");
    #1; busy = 0;
    wait (order.size() == 5 && g3order.size() == 3);
    chk(order[1] == 0 && order[2] == 1 && order[3] == 2 && order[4] == 3, "priority order 0,1,2,3");
    for (int i = 2; i < 5; i++) chk(gtime[i] - gtime[i-1] == 7, $sformatf("result bus spacing %0d", gtime[i] - gtime[i-1]));
    chk(g3order[0] == 0 && g3order[1] == 1 && g3order[2] == 2, "LU234 priority LU2, LU3, LU4");
    for (int i = 1; i < 3; i++) chk(g3time[i] - g3time[i-1] == 8, $sformatf("LU234 bus spacing %0d", g3time[i] - g3time[i-1]));
    // a low-priority request is not pre-empted by a later high one
    repeat (10) @(posedge clk);
    #1; req[3] = 1;
    @(posedge clk); #1; req[0] = 1;
    wait (order.size() == 7);
    chk(order[5] == 3 && order[6] == 0, "no pre-emption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
