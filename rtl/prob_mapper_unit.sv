// prob_mapper_unit: the probabilistic-mapper convolution processor.
//
// An AER receiver takes input spikes (12-bit pixel addresses), the mapper
// core replaces each with the list of mapped events read from the external
// mapping-table SRAM, each repeated R times and sent with probability P,
// and an AER emitter sends the signed output events (13 bits: sign on top
// of the address). A later stage that adds positive and subtracts negative
// events per address completes the convolution. The SRAM itself is off
// chip, so its address, output enable and data are ports. Block structure
// (receiver, table memory, comparator with random generator, emitter)
// follows the document; the widths and the handshake polarity are this
// design's choice.
module prob_mapper_unit
  import aer_conv_pkg::*;
#(
  parameter int unsigned MAP_SLOTS = 9,
  parameter int unsigned SRAM_AW   = 16,
  parameter int unsigned SRAM_WAIT = 2,
  parameter int unsigned SYNC      = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // AER input
  input  logic               in_req,
  input  logic [ADDR_W-1:0]  in_data,
  output logic               in_ack,
  // AER output
  output logic               out_req,
  output logic [MEV_W-1:0]   out_data,
  input  logic               out_ack,
  // mapping table SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe,
  input  logic [31:0]        sram_rdata,
  // status
  output logic               st_dropped
);

  logic              ev_valid, ev_ready;
  logic [ADDR_W-1:0] ev_addr;
  logic              mo_valid, mo_ready;
  logic [MEV_W-1:0]  mo_event;

  aer_rx #(.W(ADDR_W), .SYNC(SYNC)) u_rx (
    .clk, .rst_n,
    .aer_req(in_req), .aer_data(in_data), .aer_ack(in_ack),
    .ev_valid, .ev_addr, .ev_ready
  );

  prob_mapper #(.MAP_SLOTS(MAP_SLOTS), .SRAM_AW(SRAM_AW), .SRAM_WAIT(SRAM_WAIT)) u_map (
    .clk, .rst_n,
    .in_valid(ev_valid), .in_addr(ev_addr), .in_ready(ev_ready),
    .sram_addr, .sram_oe, .sram_rdata,
    .out_valid(mo_valid), .out_event(mo_event), .out_ready(mo_ready),
    .dropped(st_dropped)
  );

  aer_tx #(.W(MEV_W), .SYNC(SYNC)) u_tx (
    .clk, .rst_n,
    .ev_valid(mo_valid), .ev_addr(mo_event), .ev_ready(mo_ready),
    .aer_req(out_req), .aer_data(out_data), .aer_ack(out_ack)
  );

endmodule
