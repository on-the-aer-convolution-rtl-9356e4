// prob_mapper: probabilistic multi-event AER mapper core.
//
// Every input address owns MAP_SLOTS consecutive words of an external
// mapping-table SRAM, starting at address * MAP_SLOTS. Each word
// (aer_conv_pkg::map_entry_t) holds a mapped output event with its sign, a
// repetition factor R and a probability code P, plus `valid` and `last`
// flags. For each input event the FSM reads the words in order and, for
// each of the R repetitions of a word, draws a pseudo-random byte from an
// LFSR and sends the mapped event when the byte is at most P (probability
// (P+1)/256). Reading stops after a word marked `last`, at an invalid word
// or after MAP_SLOTS words. The expected number of copies of an entry is
// R*(P+1)/256, the kernel weight it stands for; a kernel weight K becomes
// R = ceil(K) and P = K/R, as the document derives. The table organisation
// (fixed slots per address, flags) and the probability encoding are this
// design's choices.
//
// SRAM interface: asynchronous SRAM read; `sram_addr` is held for
// SRAM_WAIT+1 cycles and `sram_rdata` is sampled at the end, so SRAM_WAIT
// clock cycles must cover the access time.
//
// Timing, output always ready: 1 cycle to accept an event, then per word
// SRAM_WAIT+1 cycles to read it, 1 cycle per repetition for the draw and 1
// more per copy sent; a word with R = 0 costs one decision cycle.
module prob_mapper
  import aer_conv_pkg::*;
#(
  parameter int unsigned MAP_SLOTS = 9,        // 3x3 kernel
  parameter int unsigned SRAM_AW   = 16,
  parameter int unsigned SRAM_WAIT = 2,
  parameter logic [31:0] SEED      = 32'hC0FF_EE11
) (
  input  logic               clk,
  input  logic               rst_n,
  // input events
  input  logic               in_valid,
  input  logic [ADDR_W-1:0]  in_addr,
  output logic               in_ready,
  // mapping table SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe,
  input  logic [31:0]        sram_rdata,
  // output events {sign, address}
  output logic               out_valid,
  output logic [MEV_W-1:0]   out_event,
  input  logic               out_ready,
  // status
  output logic               dropped       // one-cycle pulse: a draw failed
);

  typedef enum logic [1:0] {IDLE, FETCH, DECIDE, SEND} map_state_e;

  map_state_e           state_q;
  logic [SRAM_AW-1:0]   base_q;
  logic [$clog2(MAP_SLOTS+1)-1:0] slot_q;
  logic [$clog2(SRAM_WAIT+1)-1:0] wait_q;
  map_entry_t           ent_q;
  map_entry_t           ent_in;
  logic [3:0]           rep_q;
  logic [7:0]           rnd;
  logic                 hit, word_done, list_done;

  lfsr #(.OUT_W(8), .STEP(8), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(state_q == DECIDE), .rnd
  );

  assign ent_in    = map_entry_t'(sram_rdata);
  assign hit       = (rnd <= ent_q.prob);
  assign list_done = ent_q.last || (slot_q == ($clog2(MAP_SLOTS+1))'(MAP_SLOTS - 1));

  assign in_ready  = (state_q == IDLE);
  assign sram_addr = base_q + SRAM_AW'(slot_q);
  assign sram_oe   = (state_q == FETCH);
  assign out_valid = (state_q == SEND);
  assign out_event = ent_q.event_;
  assign dropped   = (state_q == DECIDE) && (rep_q != '0) && !hit;
  // The current word is finished after this repetition.
  assign word_done = (rep_q <= 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      base_q  <= '0;
      slot_q  <= '0;
      wait_q  <= '0;
      ent_q   <= '0;
      rep_q   <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (in_valid) begin
          base_q  <= SRAM_AW'(in_addr * MAP_SLOTS);
          slot_q  <= '0;
          wait_q  <= '0;
          state_q <= FETCH;
        end
        FETCH: begin
          if (wait_q == ($clog2(SRAM_WAIT+1))'(SRAM_WAIT)) begin
            wait_q  <= '0;
            ent_q   <= ent_in;
            rep_q   <= ent_in.rep;
            state_q <= ent_in.valid ? DECIDE : IDLE;
          end else begin
            wait_q <= wait_q + 1'b1;
          end
        end
        DECIDE: begin
          if (rep_q != '0 && hit) begin
            state_q <= SEND;
          end else begin
            rep_q <= (rep_q == '0) ? '0 : rep_q - 1'b1;
            if (word_done) begin
              if (list_done) state_q <= IDLE;
              else begin
                slot_q  <= slot_q + 1'b1;
                state_q <= FETCH;
              end
            end
          end
        end
        SEND: if (out_ready) begin
          rep_q <= rep_q - 1'b1;
          if (word_done) begin
            if (list_done) state_q <= IDLE;
            else begin
              slot_q  <= slot_q + 1'b1;
              state_q <= FETCH;
            end
          end else begin
            state_q <= DECIDE;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  initial assert (MAP_SLOTS * (2 ** ADDR_W) <= 2 ** SRAM_AW)
    else $error("prob_mapper: mapping table does not fit the SRAM address space");

endmodule
