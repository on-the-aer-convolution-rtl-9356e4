// conv_ram_processor: AER convolution processor with integrators in RAM.
//
// Input spikes arrive as 12-bit pixel addresses (i,j) on a four-phase AER
// bus. For each one, the engine adds the configured N x N kernel into a
// 64x64 matrix of 8-bit integrators centred on (i,j), limiting every cell
// to 0..255, so the matrix always holds the running convolution of the
// input spike image. A forgetting controller periodically subtracts a
// constant from all cells so that they do not stay saturated. A random
// generator reads the matrix through the RAM's second port and emits output
// spikes at rates proportional to the cell values (Poisson-like). Kernel
// weights, kernel size, forgetting period and forgetting quantity arrive as
// 32-bit frames on an SPI link. The four parallel parts (event processing,
// forgetting, output generation, configuration) follow the document; how
// they share the RAM ports is this design's choice: the updater owns port A
// and gives forgetting priority over kernel copies, and the generator owns
// port B.
//
// Status outputs pulse for one cycle on the events a test wants to see:
// `st_stall` (a kernel update waits for forgetting), `st_sat_hi`/`st_sat_lo`
// (a written cell clipped at 255 / 0), `st_skip` (a kernel position outside
// the image), `st_sweep` (a forgetting sweep starts), `st_kconflict` (the
// engine waits for a kernel write) and `st_bad_frame`; `st_clearing` is
// high during the clearing sweep after reset.
//
// Timing at 50 MHz: 2*N*N + 1 cycles per input event when nothing else
// uses port A (N = 11: 243 cycles, 4.86 us).
module conv_ram_processor
  import aer_conv_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** ADDR_W,  // 64x64 cells
  parameter int unsigned PW    = 24,           // forgetting period width
  parameter int unsigned SYNC  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // AER input
  input  logic              in_req,
  input  logic [ADDR_W-1:0] in_data,
  output logic              in_ack,
  // AER output
  output logic              out_req,
  output logic [ADDR_W-1:0] out_data,
  input  logic              out_ack,
  // SPI configuration
  input  logic              spi_sclk,
  input  logic              spi_cs_n,
  input  logic              spi_mosi,
  // status
  output logic              st_stall,
  output logic              st_sat_hi,
  output logic              st_sat_lo,
  output logic              st_skip,
  output logic              st_sweep,
  output logic              st_kconflict,
  output logic              st_bad_frame,
  output logic              st_clearing
);

  // AER input -> engine
  logic              ev_valid, ev_ready;
  logic [ADDR_W-1:0] ev_addr;
  // configuration
  logic              frame_valid;
  logic [31:0]       frame;
  logic              cfg_we;
  logic [KADDR_W-1:0] cfg_waddr;
  logic signed [KW-1:0] cfg_wdata;
  logic [3:0]        ksize;
  logic [PW-1:0]     fperiod;
  logic [CELL_W-1:0] fquant;
  // kernel RAM
  logic              eng_k_en, k_en, k_gnt;
  logic [KADDR_W-1:0] eng_k_addr, k_addr;
  logic signed [KW-1:0] k_rdata;
  // updater ports
  logic              e_valid, e_ready, e_skip;
  logic [ADDR_W-1:0] e_addr;
  logic signed [DELTA_W-1:0] e_delta;
  logic              f_valid, f_ready;
  logic [ADDR_W-1:0] f_addr;
  logic signed [DELTA_W-1:0] f_delta;
  logic              upd_busy;
  // cell RAM
  logic              a_en, a_we, b_en;
  logic [ADDR_W-1:0] a_addr, b_addr;
  logic [CELL_W-1:0] a_wdata, a_rdata, b_rdata;
  // generator -> AER output
  logic              og_valid, og_ready;
  logic [ADDR_W-1:0] og_addr;

  aer_rx #(.W(ADDR_W), .SYNC(SYNC)) u_rx (
    .clk, .rst_n,
    .aer_req(in_req), .aer_data(in_data), .aer_ack(in_ack),
    .ev_valid, .ev_addr, .ev_ready
  );

  spi_slave #(.FRAME_W(32)) u_spi (
    .clk, .rst_n,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi),
    .frame_valid, .frame
  );

  config_ctrl #(.PW(PW)) u_cfg (
    .clk, .rst_n, .frame_valid, .frame,
    .k_we(cfg_we), .k_waddr(cfg_waddr), .k_wdata(cfg_wdata),
    .ksize, .fperiod, .fquant, .bad_frame(st_bad_frame)
  );

  // The kernel RAM has one port: a configuration write takes it.
  assign k_gnt  = !cfg_we;
  assign k_en   = cfg_we || eng_k_en;
  assign k_addr = cfg_we ? cfg_waddr : eng_k_addr;

  kernel_ram #(.W(KW), .DEPTH(KENTRIES)) u_kram (
    .clk, .en(k_en), .we(cfg_we), .addr(k_addr), .wdata(cfg_wdata), .rdata(k_rdata)
  );

  conv_engine u_eng (
    .clk, .rst_n, .ksize,
    .ev_valid, .ev_addr, .ev_ready,
    .k_en(eng_k_en), .k_addr(eng_k_addr), .k_gnt, .k_rdata,
    .u_valid(e_valid), .u_ready(e_ready), .u_addr(e_addr), .u_delta(e_delta), .u_skip(e_skip)
  );

  forget_ctrl #(.DEPTH(DEPTH), .PW(PW)) u_fgt (
    .clk, .rst_n, .period(fperiod), .quant(fquant),
    .f_valid, .f_ready, .f_addr, .f_delta,
    .clearing(st_clearing), .sweep_start(st_sweep)
  );

  cell_updater #(.W(CELL_W), .DEPTH(DEPTH)) u_upd (
    .clk, .rst_n,
    .e_valid, .e_ready, .e_addr, .e_delta, .e_skip,
    .f_valid, .f_ready, .f_addr, .f_delta,
    .ram_en(a_en), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_rdata(a_rdata),
    .busy(upd_busy), .sat_hi(st_sat_hi), .sat_lo(st_sat_lo)
  );

  cell_ram #(.W(CELL_W), .DEPTH(DEPTH)) u_cells (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_addr, .b_rdata
  );

  // No output while the matrix still holds its power-up contents.
  poisson_gen #(.W(CELL_W), .DEPTH(DEPTH)) u_gen (
    .clk, .rst_n, .en(!st_clearing),
    .ram_en(b_en), .ram_addr(b_addr), .ram_rdata(b_rdata),
    .ev_valid(og_valid), .ev_addr(og_addr), .ev_ready(og_ready)
  );

  aer_tx #(.W(ADDR_W), .SYNC(SYNC)) u_tx (
    .clk, .rst_n,
    .ev_valid(og_valid), .ev_addr(og_addr), .ev_ready(og_ready),
    .aer_req(out_req), .aer_data(out_data), .aer_ack(out_ack)
  );

  assign st_stall     = e_valid && !e_ready && !upd_busy;
  assign st_skip      = e_valid && e_ready && e_skip;
  assign st_kconflict = eng_k_en && cfg_we;

  initial assert (DEPTH == 2 ** ADDR_W)
    else $error("conv_ram_processor: DEPTH must match the AER address width");

endmodule
