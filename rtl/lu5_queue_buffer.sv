// lu5_queue_buffer: LU5 and the queue buffer (QB, "cell section 5") of one
// DFM block.
//
// Every result packet broadcast on the result bus is taken by LU5 of every
// block. If the block's matching units (LU2, LU3, LU4, together "LU234")
// are idle and nothing is waiting in the QB, the packet goes straight to
// them. Otherwise it is appended to the QB, a first-in first-out circular
// queue, and queued packets are handed to LU234, oldest first, whenever
// they become free. Queueing and dequeueing are independent and may happen
// in the same cycle. If a packet arrives while the QB is full it is kept in
// a holding register and busy stays high until it has been queued; busy
// tells the result bus controller not to grant the bus.
//
// Interface: rb_valid/rb_msg from the result bus (one-cycle strobe);
// lu234_busy from the matching units; out_valid/out_msg to LU234 as a
// one-cycle strobe (the operand-bus message of the design), never on two
// consecutive cycles so that LU234 can raise busy first; busy to the
// result bus controller. Latency: a packet reaches LU234 on the clock edge
// after it appears on the result bus. The behaviour follows the design's
// LU5 description; the one-cycle latencies are this implementation's
// (the prototype needed 3 to 6 cycles).
// The circular queue's pointer outputs are not needed here and stay
// unconnected inside this module (wp, rp).
module lu5_queue_buffer
  import dfc_pkg::*;
#(
  parameter int unsigned Q_AW = 8   // 256-entry queue
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rb_valid,
  input  result_t rb_msg,
  input  logic    lu234_busy,
  output logic    out_valid,
  output result_t out_msg,
  output logic    busy,
  output logic    queued_event   // a packet was queued (for statistics)
);

  logic    q_push, q_pop, q_empty, q_full;
  result_t q_din, q_dout;
  logic    hold_valid;
  result_t hold_msg;
  logic    can_dispatch, bypass;
  logic [Q_AW-1:0] wp, rp;

  circ_queue #(.D_WIDTH($bits(result_t)), .A_WIDTH(Q_AW)) u_qb (
    .clk, .rst_n,
    .push(q_push), .din(q_din),
    .pop(q_pop), .dout(q_dout),
    .empty(q_empty), .full(q_full),
    .wr_ptr(wp), .rd_ptr(rp)
  );

  assign can_dispatch = !lu234_busy && !out_valid;
  assign bypass       = can_dispatch && q_empty && !hold_valid && rb_valid;
  assign q_pop        = can_dispatch && !q_empty;

  always_comb begin
    q_push = 1'b0;
    q_din  = rb_msg;
    if (hold_valid) begin
      q_push = !q_full;
      q_din  = hold_msg;
    end else if (rb_valid && !bypass) begin
      q_push = !q_full;
    end
  end

  assign busy         = q_full || hold_valid;
  assign queued_event = q_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_msg    <= '0;
      hold_valid <= 1'b0;
      hold_msg   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (q_pop) begin
        out_valid <= 1'b1;
        out_msg   <= q_dout;
      end else if (bypass) begin
        out_valid <= 1'b1;
        out_msg   <= rb_msg;
      end
      if (hold_valid) begin
        if (!q_full) hold_valid <= 1'b0;
      end else if (rb_valid && !bypass && q_full) begin
        hold_valid <= 1'b1;
        hold_msg   <= rb_msg;
      end
    end
  end

endmodule
