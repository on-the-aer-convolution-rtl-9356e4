// aer_rx: AER bus receiver (four-phase REQ/ACK handshake).
//
// A sender puts an address on `aer_data` and raises `aer_req`; the receiver
// answers with `aer_ack`, the sender drops REQ, and the receiver drops ACK.
// REQ comes from another clock domain, so it passes a SYNC-stage
// synchronizer; the address has been stable since before REQ rose, so it is
// sampled directly once the synchronized REQ is seen high.
//
// The captured address is offered on a valid/ready stream (`ev_valid`,
// `ev_addr`, `ev_ready`). ACK is raised only after the event has been taken,
// so a busy core back-pressures the sender through ACK. Both signals are
// active high here; the document names REQ and ACK but not their polarity.
//
// Timing: with an always-ready consumer, ev_valid rises SYNC+1 cycles after
// REQ, ACK rises one cycle after the hand-off and falls SYNC+1 cycles after
// REQ falls.
module aer_rx #(
  parameter int unsigned W    = 12,
  parameter int unsigned SYNC = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // AER side
  input  logic         aer_req,
  input  logic [W-1:0] aer_data,
  output logic         aer_ack,
  // core side
  output logic         ev_valid,
  output logic [W-1:0] ev_addr,
  input  logic         ev_ready
);

  typedef enum logic [1:0] {WAIT_REQ, HOLD, ACKED} rx_state_e;

  rx_state_e       state_q;
  logic [SYNC-1:0] req_sync_q;
  logic            req_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_sync_q <= '0;
    else        req_sync_q <= {req_sync_q[SYNC-2:0], aer_req};
  end
  assign req_s = req_sync_q[SYNC-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= WAIT_REQ;
      ev_addr <= '0;
      aer_ack <= 1'b0;
    end else begin
      unique case (state_q)
        WAIT_REQ: if (req_s) begin
          ev_addr <= aer_data;
          state_q <= HOLD;
        end
        HOLD: if (ev_ready) begin
          aer_ack <= 1'b1;
          state_q <= ACKED;
        end
        ACKED: if (!req_s) begin
          aer_ack <= 1'b0;
          state_q <= WAIT_REQ;
        end
        default: state_q <= WAIT_REQ;
      endcase
    end
  end

  assign ev_valid = (state_q == HOLD);

  initial assert (SYNC >= 2) else $error("aer_rx: SYNC must be at least 2");

endmodule
