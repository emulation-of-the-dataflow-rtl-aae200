// circ_queue: circular queue with a load pointer and an execute pointer.
//
// A memory of 2**A_WIDTH words is addressed by two pointers: wr_ptr (the
// next free location, "NILP" in the instruction queue) and rd_ptr (the
// oldest entry, "NIEP"). Both advance modulo 2**A_WIDTH. The queue is empty
// when the pointers are equal and full when wr_ptr == rd_ptr - 1, so it
// holds at most 2**A_WIDTH - 1 entries; this empty/full rule is the one the
// design specifies. The same queue backs the result queue buffer of every
// DFM block (18 bits x 256) and every instruction-queue bank (29 bits x 16).
//
// Interface: push writes din at wr_ptr on the clock edge if not full; pop
// drops the head if not empty. dout shows the head entry combinationally
// (the value at rd_ptr), so a consumer reads it and pops in the same cycle.
// push and pop may happen in the same cycle. Reset empties the queue; the
// storage itself is not reset.
module circ_queue #(
  parameter int unsigned D_WIDTH = 18,
  parameter int unsigned A_WIDTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push,
  input  logic [D_WIDTH-1:0] din,
  input  logic               pop,
  output logic [D_WIDTH-1:0] dout,
  output logic               empty,
  output logic               full,
  output logic [A_WIDTH-1:0] wr_ptr,
  output logic [A_WIDTH-1:0] rd_ptr
);

  logic [D_WIDTH-1:0] mem [2**A_WIDTH];

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr == A_WIDTH'(rd_ptr - 1'b1));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push && !full) wr_ptr <= wr_ptr + 1'b1;
      if (pop && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

endmodule
