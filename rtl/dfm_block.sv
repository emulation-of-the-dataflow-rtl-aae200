// dfm_block: one block of the Dataflow Memory, 256 intelligent cells that
// share one set of logic units.
//
// Each cell word is stored split over four cell sections. LU5 with its
// queue buffer takes every packet from the result bus; LU2, LU3 and LU4
// each compare the packet's originating address against the clause,
// operand-1 and operand-2 source addresses of all cells; every match
// becomes a token on the block's operand bus, arbitrated by the LU234 bus
// controller (LU2 first, then LU3, then LU4); LU1 deposits tokens in CS1
// and fires executables to the instruction queue or, for SP/LK cells,
// result packets back onto the result bus. This partitioning is the
// design's; a block stands for the address range {BLOCK_ADDR, 8'hxx}.
//
// Interface: load_en/load_idx/load_data write one 61-bit cell word;
// rb_valid/rb_msg is the broadcast result bus; busy (queue buffer full)
// goes to the result bus controller; exec_* is this block's request on
// the instruction bus; res_* its request on the result bus. peek_* reads a
// CS1 word. The *_event outputs are one-cycle pulses for statistics;
// match_event has one bit per matching section (LU2, LU3, LU4) because
// two sections can match in the same cycle.
module dfm_block
  import dfc_pkg::*;
#(
  parameter logic [2:0]  BLOCK_ADDR      = 3'd7,
  parameter int unsigned CYCLES_PER_CELL = 5,
  parameter int unsigned TOKEN_CYCLES    = 8,
  parameter int unsigned OBUS_SERVICE    = 7,
  parameter int unsigned QB_AW           = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_en,
  input  logic [CELL_AW-1:0] load_idx,
  input  cell_t              load_data,
  input  logic               rb_valid,
  input  result_t            rb_msg,
  output logic               busy,
  output logic               exec_req,
  output exec_t              exec,
  input  logic               exec_grant,
  output logic               res_req,
  output result_t            res_msg,
  input  logic               res_grant,
  input  logic [CELL_AW-1:0] peek_idx,
  output cs1_t               peek_data,
  output logic               fire_exec_event,
  output logic               fire_msg_event,
  output logic [2:0]         match_event,
  output logic               queued_event
);

  logic    ob_valid;       // LU5 -> LU234
  result_t ob_msg;
  logic [2:0] cs_busy;
  logic [2:0] tok_req, tok_grant, m_ev;
  token_t     tok [3];
  logic [$bits(token_t)-1:0] tok_bits [3];
  logic       t_valid;
  logic [$bits(token_t)-1:0] t_bits;
  logic       lu1_busy;
  logic       lu234_busy;

  assign lu234_busy = |cs_busy;

  lu5_queue_buffer #(.Q_AW(QB_AW)) u_lu5 (
    .clk, .rst_n,
    .rb_valid, .rb_msg,
    .lu234_busy,
    .out_valid(ob_valid), .out_msg(ob_msg),
    .busy, .queued_event
  );

  // index 0 = LU2 (clause), 1 = LU3 (operand 1), 2 = LU4 (operand 2)
  localparam tok_type_e TTYPES [3] = '{TT_CLAUSE, TT_OPD1, TT_OPD2};

  for (genvar g = 0; g < 3; g++) begin : g_cs
    csx_t sect;
    always_comb begin
      unique case (g)
        0:       sect = load_data.cs2;
        1:       sect = load_data.cs3;
        default: sect = load_data.cs4;
      endcase
    end
    cs_match #(
      .TTYPE(TTYPES[g]), .BLOCK_ADDR(BLOCK_ADDR),
      .CYCLES_PER_CELL(CYCLES_PER_CELL)
    ) u_cs (
      .clk, .rst_n,
      .load_en, .load_idx, .load_data(sect),
      .in_valid(ob_valid), .in_msg(ob_msg),
      .busy(cs_busy[g]),
      .tok_req(tok_req[g]), .tok(tok[g]), .tok_grant(tok_grant[g]),
      .match_event(m_ev[g])
    );
    assign tok_bits[g] = tok[g];
  end

  assign match_event = m_ev;

  bus_controller #(.NREQ(3), .W($bits(token_t)), .SERVICE_CYCLES(OBUS_SERVICE)) u_lu234_bc (
    .clk, .rst_n,
    .req(tok_req), .data(tok_bits), .busy(lu1_busy),
    .grant(tok_grant), .bus_valid(t_valid), .bus_data(t_bits)
  );

  lu1_cs1 #(.BLOCK_ADDR(BLOCK_ADDR), .TOKEN_CYCLES(TOKEN_CYCLES)) u_lu1 (
    .clk, .rst_n,
    .load_en, .load_idx, .load_data(load_data.cs1),
    .tok_valid(t_valid), .tok(token_t'(t_bits)),
    .busy(lu1_busy),
    .exec_req, .exec, .exec_grant,
    .res_req, .res_msg, .res_grant,
    .peek_idx, .peek_data,
    .fire_exec(fire_exec_event), .fire_msg(fire_msg_event)
  );

endmodule
