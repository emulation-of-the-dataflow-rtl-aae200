// cs_match: one matching cell section with its logic unit (CS2+LU2,
// CS3+LU3 or CS4+LU4) for the 256 cells of a DFM block.
//
// The section stores, for every cell of the block, one source address and
// a "required" flag: the clause address CAD/CR (LU2), the operand-1 source
// D1A/D1R (LU3) or the operand-2 source D2A/D2R (LU4). When LU5 hands it a
// result packet, the logic unit walks through the cells one after another
// and, for each cell whose flag is set and whose address equals the
// packet's originating address, sends a token {cell address, value, type}
// to LU1 over the LU234 operand bus. One packet can match any number of
// cells, so one result reaches every consumer without fan-out limits.
//
// Timing: each cell takes CYCLES_PER_CELL cycles to compare (5 in the
// design's measurements, the default here); a match additionally waits
// for the LU234 bus grant. Cells FIRST_CELL..LAST_CELL are scanned; cells
// 0 and 255 of a block are not used for instructions, as in the design.
// busy is high from the packet's arrival until the walk is over; the block
// accepts no new packet until all three sections are idle. The token type
// is TTYPE (01 operand 1, 10 operand 2, 11 clause). A one-word-per-cycle
// table walk with a pacing counter is this implementation's structure.
//
// Interface: load_en/load_idx/load_data write one entry (program load);
// in_valid/in_msg from LU5; tok_req/tok/tok_grant towards the LU234 bus
// controller; match_event pulses once per match (statistics).
module cs_match
  import dfc_pkg::*;
#(
  parameter tok_type_e   TTYPE           = TT_OPD1,
  parameter logic [2:0]  BLOCK_ADDR      = 3'd0,
  parameter int unsigned CYCLES_PER_CELL = 5,
  parameter int unsigned FIRST_CELL      = 1,
  parameter int unsigned LAST_CELL       = 254
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_en,
  input  logic [CELL_AW-1:0]  load_idx,
  input  csx_t                load_data,
  input  logic                in_valid,
  input  result_t             in_msg,
  output logic                busy,
  output logic                tok_req,
  output token_t              tok,
  input  logic                tok_grant,
  output logic                match_event
);

  localparam int unsigned PW = $clog2(CYCLES_PER_CELL + 1);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_SEND} state_e;

  csx_t               table_mem [2**CELL_AW];
  state_e             state;
  logic [CELL_AW-1:0] idx;
  logic [PW-1:0]      pace;
  result_t            msg_q;
  csx_t               entry;
  logic               hit;

  assign entry = table_mem[idx];
  assign hit   = entry.req && (entry.addr == msg_q.oa);
  assign busy  = (state != S_IDLE);

  assign tok_req = (state == S_SEND);
  assign tok     = '{caddr: {BLOCK_ADDR, idx}, value: msg_q.value, ttype: TTYPE};

  always_ff @(posedge clk) begin
    if (load_en) table_mem[load_idx] <= load_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      idx         <= '0;
      pace        <= '0;
      msg_q       <= '0;
      match_event <= 1'b0;
    end else begin
      match_event <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            msg_q <= in_msg;
            idx   <= CELL_AW'(FIRST_CELL);
            pace  <= PW'(CYCLES_PER_CELL - 1);
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (pace != '0) begin
            pace <= pace - 1'b1;
          end else if (hit) begin
            match_event <= 1'b1;
            state       <= S_SEND;
          end else if (idx == CELL_AW'(LAST_CELL)) begin
            state <= S_IDLE;
          end else begin
            idx  <= idx + 1'b1;
            pace <= PW'(CYCLES_PER_CELL - 1);
          end
        end
        S_SEND: begin
          if (tok_grant) begin
            if (idx == CELL_AW'(LAST_CELL)) begin
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              pace  <= PW'(CYCLES_PER_CELL - 1);
              state <= S_SCAN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
