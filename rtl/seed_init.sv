// seed_init: starts program execution by injecting the seed clause.
//
// After a program is loaded nothing in the DFM can fire until a first
// result arrives. This unit supplies it: on a rising edge of init it asks
// the result bus controller for the bus and, once granted, the result
// packet {OA = 7FF, value = 1} is broadcast. Cells whose clause address is
// 7FF (the otherwise unused last cell of block 7) receive a true clause and
// start firing. The seed address and value are the design's; issuing the
// seed as an ordinary, lowest-priority bus request (rather than forcing it
// onto the bus) is this implementation's choice.
//
// Interface: init (level; its rising edge triggers one seed), req/msg to
// the result bus controller, grant from it. One seed per init edge.
module seed_init
  import dfc_pkg::*;
#(
  parameter addr_t SEED_ADDR  = SEED_OA,
  parameter data_t SEED_VALUE = 7'd1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    grant,
  output logic    req,
  output result_t msg
);

  logic init_q;

  assign msg = '{oa: SEED_ADDR, value: SEED_VALUE};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q <= 1'b0;
      req    <= 1'b0;
    end else begin
      init_q <= init;
      if (init && !init_q) req <= 1'b1;
      else if (grant)      req <= 1'b0;
    end
  end

endmodule
