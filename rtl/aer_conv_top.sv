// aer_conv_top: the two AER convolution processors side by side.
//
// The two processors are separate designs that share no signal; each keeps
// its own clock, reset and AER buses:
//  * conv_*: the RAM-integrator processor (64x64 8-bit integrators, kernels
//    up to 11x11, forgetting, Poisson-like output, SPI configuration),
//    clocked at 50 MHz in the published set-up.
//  * map_*:  the probabilistic multi-event mapper (3x3 kernels as lists of
//    signed mapped events with repetition and probability in an external
//    SRAM), clocked at 100 MHz in the published set-up. The mapping-table
//    SRAM is off chip, so its pins are ports here.
// See conv_ram_processor and prob_mapper_unit for behaviour and timing.
module aer_conv_top
  import aer_conv_pkg::*;
#(
  parameter int unsigned MAP_SLOTS = 9,
  parameter int unsigned SRAM_AW   = 16,
  parameter int unsigned SRAM_WAIT = 2
) (
  // RAM-integrator processor
  input  logic               conv_clk,
  input  logic               conv_rst_n,
  input  logic               conv_in_req,
  input  logic [ADDR_W-1:0]  conv_in_data,
  output logic               conv_in_ack,
  output logic               conv_out_req,
  output logic [ADDR_W-1:0]  conv_out_data,
  input  logic               conv_out_ack,
  input  logic               conv_spi_sclk,
  input  logic               conv_spi_cs_n,
  input  logic               conv_spi_mosi,
  output logic [7:0]         conv_status,   // {clearing, bad_frame, kconflict, sweep, skip, sat_lo, sat_hi, stall}
  // probabilistic mapper
  input  logic               map_clk,
  input  logic               map_rst_n,
  input  logic               map_in_req,
  input  logic [ADDR_W-1:0]  map_in_data,
  output logic               map_in_ack,
  output logic               map_out_req,
  output logic [MEV_W-1:0]   map_out_data,
  input  logic               map_out_ack,
  output logic [SRAM_AW-1:0] map_sram_addr,
  output logic               map_sram_oe,
  input  logic [31:0]        map_sram_rdata,
  output logic               map_dropped
);

  conv_ram_processor u_conv (
    .clk(conv_clk), .rst_n(conv_rst_n),
    .in_req(conv_in_req), .in_data(conv_in_data), .in_ack(conv_in_ack),
    .out_req(conv_out_req), .out_data(conv_out_data), .out_ack(conv_out_ack),
    .spi_sclk(conv_spi_sclk), .spi_cs_n(conv_spi_cs_n), .spi_mosi(conv_spi_mosi),
    .st_stall(conv_status[0]), .st_sat_hi(conv_status[1]), .st_sat_lo(conv_status[2]),
    .st_skip(conv_status[3]), .st_sweep(conv_status[4]), .st_kconflict(conv_status[5]),
    .st_bad_frame(conv_status[6]), .st_clearing(conv_status[7])
  );

  prob_mapper_unit #(.MAP_SLOTS(MAP_SLOTS), .SRAM_AW(SRAM_AW), .SRAM_WAIT(SRAM_WAIT)) u_map (
    .clk(map_clk), .rst_n(map_rst_n),
    .in_req(map_in_req), .in_data(map_in_data), .in_ack(map_in_ack),
    .out_req(map_out_req), .out_data(map_out_data), .out_ack(map_out_ack),
    .sram_addr(map_sram_addr), .sram_oe(map_sram_oe), .sram_rdata(map_sram_rdata),
    .st_dropped(map_dropped)
  );

endmodule
