// bus_controller: fixed-priority arbiter that owns a shared message bus.
//
// Used twice per machine with different sizes: as the result bus
// controller (requesters: the LU1 of every DFM block, then the processors,
// then the seed source; a request is served in 6 cycles) and inside every
// DFM block as the LU234 bus controller (requesters LU2, LU3, LU4; served
// in 7 cycles). Index 0 has the highest priority. Priority only decides
// between requests that are waiting together; a request that is being
// served is never pre-empted.
//
// Protocol: a requester raises req[i] with its message on data[i] and
// holds both until it sees grant[i]. When the controller is idle and busy
// is low it picks the lowest waiting index, registers that message onto
// bus_data with bus_valid high for one cycle and pulses grant[i] in that
// same cycle. It then ignores requests for SERVICE_CYCLES cycles, so two
// grants are at least SERVICE_CYCLES+1 cycles apart. A request raised
// right after a clock edge is granted on the next edge (permission in the
// second cycle). busy (a downstream unit that cannot take a message) holds
// off new grants only; the service time, the priority order and the
// best-case two-cycle grant follow the design's timing tables, while the
// exact handshake is this implementation's.
module bus_controller #(
  parameter int unsigned NREQ           = 4,
  parameter int unsigned W              = 18,
  parameter int unsigned SERVICE_CYCLES = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic [W-1:0]    data [NREQ],
  input  logic            busy,
  output logic [NREQ-1:0] grant,
  output logic            bus_valid,
  output logic [W-1:0]    bus_data
);

  localparam int unsigned CW = $clog2(SERVICE_CYCLES + 1);

  logic [CW-1:0]   hold_cnt;
  logic [NREQ-1:0] pick;
  logic            can_grant;

  // lowest-index request wins
  always_comb begin
    pick = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i]) pick = NREQ'(1) << i;
    end
  end

  assign can_grant = (hold_cnt == '0) && !busy && (|req);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_cnt  <= '0;
      grant     <= '0;
      bus_valid <= 1'b0;
      bus_data  <= '0;
    end else begin
      grant     <= '0;
      bus_valid <= 1'b0;
      if (can_grant) begin
        grant     <= pick;
        bus_valid <= 1'b1;
        for (int i = 0; i < NREQ; i++) begin
          if (pick[i]) bus_data <= data[i];
        end
        hold_cnt <= CW'(SERVICE_CYCLES);
      end else if (hold_cnt != '0) begin
        hold_cnt <= hold_cnt - 1'b1;
      end
    end
  end

  // at most one grant at a time
  a_onehot_grant : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
