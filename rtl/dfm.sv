// dfm: the Dataflow Memory, an intelligent memory that holds the whole
// program and decides by itself which instructions are ready.
//
// NBLOCKS blocks of 256 cells (8 blocks, 2K words, in the design) sit on
// two buses. The result bus broadcasts every result packet to all blocks;
// its controller grants it to the LU1 of each block (highest priority,
// block 0 first), then to the processors, then to the seed source, and
// only while no block's queue buffer is full. The instruction bus carries
// executables from the blocks' LU1s to the instruction queue. The
// partition into blocks, the result bus and its priority order are the
// design's. The design shows one LU1 per block feeding the queue but does
// not say how several blocks share the instruction bus; here a second
// bus_controller instance (fixed priority, block 0 first, one-cycle
// service) does it.
//
// Interface: load/load_addr/load_data write one 61-bit cell word
// (load_addr[10:8] selects the block); init starts execution with the
// seed clause; proc_* are the processors' result bus requests; exec_valid/
// exec/iq_busy is the instruction bus towards the instruction queue;
// rb_valid/rb_msg expose the result bus; peek_addr/peek_data read a CS1
// word; the *_events outputs are one-cycle statistics pulses, one bit per
// block (match_events: three bits per block, LU2/LU3/LU4).
module dfm
  import dfc_pkg::*;
#(
  parameter int unsigned NBLOCKS         = 8,
  parameter int unsigned NPROC           = 2,
  parameter int unsigned CYCLES_PER_CELL = 5,
  parameter int unsigned TOKEN_CYCLES    = 8,
  parameter int unsigned RBUS_SERVICE    = 6,
  parameter int unsigned OBUS_SERVICE    = 7,
  parameter int unsigned QB_AW           = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  addr_t            load_addr,
  input  cell_t            load_data,
  input  logic             init,
  input  logic [NPROC-1:0] proc_req,
  input  result_t          proc_msg [NPROC],
  output logic [NPROC-1:0] proc_grant,
  output logic             exec_valid,
  output exec_t            exec,
  input  logic             iq_busy,
  output logic             rb_valid,
  output result_t          rb_msg,
  input  addr_t            peek_addr,
  output cs1_t             peek_data,
  output logic [NBLOCKS-1:0]   fire_exec_events,
  output logic [NBLOCKS-1:0]   fire_msg_events,
  output logic [3*NBLOCKS-1:0] match_events,
  output logic [NBLOCKS-1:0]   queued_events,
  output logic             qb_busy
);

  localparam int unsigned NRREQ = NBLOCKS + NPROC + 1;
  localparam int unsigned RW    = $bits(result_t);
  localparam int unsigned XW    = $bits(exec_t);

  logic [NBLOCKS-1:0] blk_busy, blk_exec_req, blk_exec_grant, blk_res_req, blk_res_grant;
  logic [NBLOCKS-1:0] ev_fx, ev_fm, ev_q;
  logic [2:0]         ev_m [NBLOCKS];
  exec_t              blk_exec [NBLOCKS];
  result_t            blk_res  [NBLOCKS];
  cs1_t               blk_peek [NBLOCKS];

  logic [NRREQ-1:0]  r_req, r_grant;
  logic [RW-1:0]     r_data [NRREQ];
  logic [RW-1:0]     rb_bits;
  logic [XW-1:0]     x_data [NBLOCKS];
  logic [XW-1:0]     x_bits;
  logic              seed_req;
  result_t           seed_msg;

  for (genvar b = 0; b < NBLOCKS; b++) begin : g_blk
    dfm_block #(
      .BLOCK_ADDR(3'(b)), .CYCLES_PER_CELL(CYCLES_PER_CELL),
      .TOKEN_CYCLES(TOKEN_CYCLES), .OBUS_SERVICE(OBUS_SERVICE), .QB_AW(QB_AW)
    ) u_block (
      .clk, .rst_n,
      .load_en(load && load_addr[AW-1 -: BLK_AW] == 3'(b)),
      .load_idx(load_addr[CELL_AW-1:0]), .load_data,
      .rb_valid, .rb_msg,
      .busy(blk_busy[b]),
      .exec_req(blk_exec_req[b]), .exec(blk_exec[b]), .exec_grant(blk_exec_grant[b]),
      .res_req(blk_res_req[b]), .res_msg(blk_res[b]), .res_grant(blk_res_grant[b]),
      .peek_idx(peek_addr[CELL_AW-1:0]), .peek_data(blk_peek[b]),
      .fire_exec_event(ev_fx[b]), .fire_msg_event(ev_fm[b]),
      .match_event(ev_m[b]), .queued_event(ev_q[b])
    );
    assign r_req[b]  = blk_res_req[b];
    assign r_data[b] = blk_res[b];
    assign blk_res_grant[b] = r_grant[b];
    assign x_data[b] = blk_exec[b];
    assign match_events[3*b +: 3] = ev_m[b];
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_preq
    assign r_req[NBLOCKS + p]  = proc_req[p];
    assign r_data[NBLOCKS + p] = proc_msg[p];
    assign proc_grant[p]       = r_grant[NBLOCKS + p];
  end

  seed_init u_init (
    .clk, .rst_n, .init,
    .grant(r_grant[NRREQ-1]), .req(seed_req), .msg(seed_msg)
  );
  assign r_req[NRREQ-1]  = seed_req;
  assign r_data[NRREQ-1] = seed_msg;

  assign qb_busy = |blk_busy;

  bus_controller #(.NREQ(NRREQ), .W(RW), .SERVICE_CYCLES(RBUS_SERVICE)) u_result_bc (
    .clk, .rst_n,
    .req(r_req), .data(r_data), .busy(qb_busy),
    .grant(r_grant), .bus_valid(rb_valid), .bus_data(rb_bits)
  );
  assign rb_msg = result_t'(rb_bits);

  bus_controller #(.NREQ(NBLOCKS), .W(XW), .SERVICE_CYCLES(1)) u_instr_bc (
    .clk, .rst_n,
    .req(blk_exec_req), .data(x_data), .busy(iq_busy),
    .grant(blk_exec_grant), .bus_valid(exec_valid), .bus_data(x_bits)
  );
  assign exec = exec_t'(x_bits);

  assign peek_data        = blk_peek[peek_addr[AW-1 -: BLK_AW]];
  assign fire_exec_events = ev_fx;
  assign fire_msg_events  = ev_fm;
  assign queued_events    = ev_q;

endmodule
