// spi_rx: SPI receiver of packets from the peer board.
//
// sck, cs_n and mosi pass through two-flop synchronizers into the system
// clock domain. A falling cs_n starts a packet; on each rising sck edge the
// bit on mosi is shifted in, most significant first. The receiver knows the
// packet length (32-bit header plus M-bit body): after 32+M bits it presents
// the packet for one clock on out_valid. A packet cut short by cs_n rising
// is discarded and pulses short_frame. The system clock must be at least
// four times SCK (100 MHz against 25 MHz here).
//
// Interface: packets out as a one-clock valid pulse, pkt = {header, body};
// there is no back-pressure on the link. Framing, order and packet length
// follow the reference design; synchronization and the handling of short frames are
// this design's choice.
module spi_rx #(
  parameter int unsigned M = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sck,
  input  logic          cs_n,
  input  logic          mosi,
  output logic          out_valid,
  output logic [M+31:0] pkt,
  output logic          short_frame
);

  localparam int unsigned NBIT = M + 32;
  localparam int unsigned BW   = $clog2(NBIT + 1);

  logic [2:0]    sck_s;
  logic [1:0]    cs_s, mosi_s;
  logic [BW-1:0] nbits;
  logic          rise;

  assign rise = sck_s[1] && !sck_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s       <= '0;
      cs_s        <= 2'b11;
      mosi_s      <= '0;
      nbits       <= '0;
      pkt         <= '0;
      out_valid   <= 1'b0;
      short_frame <= 1'b0;
    end else begin
      sck_s       <= {sck_s[1:0], sck};
      cs_s        <= {cs_s[0], cs_n};
      mosi_s      <= {mosi_s[0], mosi};
      out_valid   <= 1'b0;
      short_frame <= 1'b0;
      if (cs_s[1]) begin
        if (nbits != '0) short_frame <= 1'b1;
        nbits <= '0;
      end else if (rise) begin
        pkt <= {pkt[M+30:0], mosi_s[1]};
        if (nbits == BW'(NBIT - 1)) begin
          nbits     <= '0;
          out_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
