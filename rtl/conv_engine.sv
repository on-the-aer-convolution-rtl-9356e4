// conv_engine: kernel-copy sequencer of the RAM-integrator convolution
// processor.
//
// For every input event (i,j) it walks the N x N kernel row by row and asks
// the cell updater to add K(r,c) to cell (i + r - N/2, j + c - N/2), that
// is Y(i+a, j+b) += K(a,b) for a,b in -N/2..N/2. Positions that fall outside
// the 64x64 image are sent as skipped requests, so every event costs the
// same time. N is the configured kernel side (odd, 1..11), sampled when the
// event is accepted.
//
// Kernel weights are read one element ahead from the single-port kernel
// RAM, so the two-cycle read/add-write rhythm of the updater is never
// broken by a kernel read. When the configuration controller holds the
// kernel port (`k_gnt` low) the engine waits.
//
// Timing: with no forgetting or configuration traffic, an event takes
// 2*N*N + 1 cycles from acceptance to acceptance of the next one: one cycle
// to accept, one to fetch the first weight, two per kernel element, less
// the last element's write cycle, which overlaps the next acceptance.
module conv_engine
  import aer_conv_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                ksize,
  // events
  input  logic                      ev_valid,
  input  logic [ADDR_W-1:0]         ev_addr,
  output logic                      ev_ready,
  // kernel RAM read port
  output logic                      k_en,
  output logic [KADDR_W-1:0]        k_addr,
  input  logic                      k_gnt,
  input  logic signed [KW-1:0]      k_rdata,
  // cell updater request port
  output logic                      u_valid,
  input  logic                      u_ready,
  output logic [ADDR_W-1:0]         u_addr,
  output logic signed [DELTA_W-1:0] u_delta,
  output logic                      u_skip
);

  typedef enum logic [1:0] {IDLE, KFETCH, REQ} eng_state_e;

  eng_state_e        state_q;
  logic [IMG_BITS-1:0] ei_q, ej_q;    // event row / column
  logic [3:0]        n_q;             // kernel side for this event
  logic [3:0]        r_q, c_q;        // element being requested
  logic [3:0]        nr, nc;          // element after it
  logic              last_el;
  logic signed [IMG_BITS+1:0] row, col;

  assign last_el = (r_q == n_q - 4'd1) && (c_q == n_q - 4'd1);
  assign nc      = (c_q == n_q - 4'd1) ? 4'd0 : c_q + 4'd1;
  assign nr      = (c_q == n_q - 4'd1) ? r_q + 4'd1 : r_q;

  // Target cell; N/2 is n_q >> 1.
  assign row = $signed({2'b00, ei_q}) + $signed({4'b0000, r_q}) - $signed({5'b00000, n_q[3:1]});
  assign col = $signed({2'b00, ej_q}) + $signed({4'b0000, c_q}) - $signed({5'b00000, n_q[3:1]});

  assign ev_ready = (state_q == IDLE);
  assign u_valid  = (state_q == REQ);
  assign u_addr   = {row[IMG_BITS-1:0], col[IMG_BITS-1:0]};
  assign u_delta  = DELTA_W'(k_rdata);
  assign u_skip   = (row < 0) || (row > (2**IMG_BITS - 1)) ||
                    (col < 0) || (col > (2**IMG_BITS - 1));

  always_comb begin
    k_en   = 1'b0;
    k_addr = KADDR_W'(r_q * KMAX + c_q);
    unique case (state_q)
      KFETCH: k_en = 1'b1;
      REQ: if (u_ready && !last_el) begin
        k_en   = 1'b1;
        k_addr = KADDR_W'(nr * KMAX + nc);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      ei_q    <= '0;
      ej_q    <= '0;
      n_q     <= 4'd1;
      r_q     <= '0;
      c_q     <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (ev_valid) begin
          ei_q    <= ev_addr[ADDR_W-1:IMG_BITS];
          ej_q    <= ev_addr[IMG_BITS-1:0];
          n_q     <= ksize;
          r_q     <= '0;
          c_q     <= '0;
          state_q <= KFETCH;
        end
        KFETCH: if (k_gnt) state_q <= REQ;
        REQ: if (u_ready) begin
          if (last_el) begin
            state_q <= IDLE;
          end else begin
            r_q <= nr;
            c_q <= nc;
            // The prefetch of the next weight only counts when granted.
            if (!k_gnt) state_q <= KFETCH;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // The kernel side must be odd and between 1 and KMAX.
  a_ksize: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == IDLE && ev_valid) |-> (ksize[0] && ksize <= 4'(KMAX)));

endmodule
