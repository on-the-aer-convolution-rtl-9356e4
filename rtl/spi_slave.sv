// spi_slave: receive side of the SPI link from the USB microcontroller.
//
// SPI mode 0, most significant bit first: `mosi` is sampled on rising
// `sclk` edges while `cs_n` is low. The three SPI wires are synchronized to
// the system clock and edges are detected there, so `sclk` must run below a
// quarter of the system clock. After FRAME_W bits `frame_valid` pulses for
// one cycle with the received word on `frame`; raising `cs_n` drops a
// partial frame. The link carries configuration only, so no data is sent
// back. That an SPI link joins the microcontroller and the FPGA is the
// document's; mode, frame length and bit order are this design's choice.
module spi_slave #(
  parameter int unsigned FRAME_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sclk,
  input  logic               cs_n,
  input  logic               mosi,
  output logic               frame_valid,
  output logic [FRAME_W-1:0] frame
);

  logic [2:0] sclk_q;
  logic [1:0] cs_q, mosi_q;
  logic       sclk_rise;
  logic [FRAME_W-2:0]         shift_q;
  logic [$clog2(FRAME_W)-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= '0;
      cs_q   <= '1;
      mosi_q <= '0;
    end else begin
      sclk_q <= {sclk_q[1:0], sclk};
      cs_q   <= {cs_q[0], cs_n};
      mosi_q <= {mosi_q[0], mosi};
    end
  end
  assign sclk_rise = sclk_q[1] && !sclk_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q     <= '0;
      cnt_q       <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (cs_q[1]) begin
        cnt_q <= '0;
      end else if (sclk_rise) begin
        shift_q <= {shift_q[FRAME_W-3:0], mosi_q[1]};
        if (cnt_q == ($clog2(FRAME_W))'(FRAME_W - 1)) begin
          cnt_q       <= '0;
          frame_valid <= 1'b1;
          frame       <= {shift_q, mosi_q[1]};
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
