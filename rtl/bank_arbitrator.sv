// bank_arbitrator: the Bank Arbitrator (BA) of the Instruction Queue.
//
// Executables arriving from the DFM are spread over the banks, one bank
// per processor, in round-robin order so that each processor gets the same
// share of the work. A register MP points at the bank to try next. When an
// executable arrives the BA stores it and becomes busy (no new executable
// is accepted). If bank MP is not busy, the BA writes the executable into
// it, waits for the bank's acknowledge, advances MP and becomes free
// again. If bank MP is busy (a write still pending, or full), MP is
// advanced and the next bank is tried in the next cycle. This procedure is
// the design's.
//
// Interface: in_valid/in_exec (one-cycle strobe, only while busy is low);
// busy; towards the banks bank_wr (one-hot strobe), bank_data, bank_busy,
// bank_ack; skip_event pulses whenever a busy bank is skipped.
module bank_arbitrator
  import dfc_pkg::*;
#(
  parameter int unsigned NBANKS = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  exec_t             in_exec,
  output logic              busy,
  output logic [NBANKS-1:0] bank_wr,
  output exec_t             bank_data,
  input  logic [NBANKS-1:0] bank_busy,
  input  logic [NBANKS-1:0] bank_ack,
  output logic              skip_event
);

  localparam int unsigned MPW = (NBANKS > 1) ? $clog2(NBANKS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_TRY, S_WAIT} state_e;

  state_e         state;
  logic [MPW-1:0] mp;
  logic [MPW-1:0] mp_next;

  assign busy    = (state != S_IDLE);
  assign mp_next = (mp == MPW'(NBANKS - 1)) ? '0 : mp + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mp         <= '0;
      bank_wr    <= '0;
      bank_data  <= '0;
      skip_event <= 1'b0;
    end else begin
      bank_wr    <= '0;
      skip_event <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          bank_data <= in_exec;
          state     <= S_TRY;
        end
        S_TRY: begin
          if (!bank_busy[mp]) begin
            bank_wr[mp] <= 1'b1;
            state       <= S_WAIT;
          end else begin
            mp         <= mp_next;
            skip_event <= 1'b1;
          end
        end
        S_WAIT: if (bank_ack[mp]) begin
          mp    <= mp_next;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_input_when_busy : assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy);

endmodule
