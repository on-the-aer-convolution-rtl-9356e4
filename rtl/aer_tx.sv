// aer_tx: AER bus emitter (four-phase REQ/ACK handshake).
//
// Takes one event from a valid/ready stream, drives it on `aer_data`, raises
// `aer_req` one cycle later, waits for the synchronized ACK to go high,
// drops REQ, waits for ACK to go low and is then ready for the next event.
// The address stays on the bus until ACK has been seen, and REQ never rises
// in the same cycle as the address changes. ACK crosses clock domains and
// passes a SYNC-stage synchronizer. Signals are active high (the polarity
// is this design's choice).
//
// Timing: an event costs 2*SYNC + 4 cycles plus the receiver's own delays.
module aer_tx #(
  parameter int unsigned W    = 12,
  parameter int unsigned SYNC = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // core side
  input  logic         ev_valid,
  input  logic [W-1:0] ev_addr,
  output logic         ev_ready,
  // AER side
  output logic         aer_req,
  output logic [W-1:0] aer_data,
  input  logic         aer_ack
);

  typedef enum logic [1:0] {IDLE, SETUP, REQ_HI, REQ_LO} tx_state_e;

  tx_state_e       state_q;
  logic [SYNC-1:0] ack_sync_q;
  logic            ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_sync_q <= '0;
    else        ack_sync_q <= {ack_sync_q[SYNC-2:0], aer_ack};
  end
  assign ack_s = ack_sync_q[SYNC-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      aer_req  <= 1'b0;
      aer_data <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (ev_valid) begin
          aer_data <= ev_addr;
          state_q  <= SETUP;
        end
        SETUP: begin
          aer_req <= 1'b1;
          state_q <= REQ_HI;
        end
        REQ_HI: if (ack_s) begin
          aer_req <= 1'b0;
          state_q <= REQ_LO;
        end
        REQ_LO: if (!ack_s) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  assign ev_ready = (state_q == IDLE);

  initial assert (SYNC >= 2) else $error("aer_tx: SYNC must be at least 2");

endmodule
