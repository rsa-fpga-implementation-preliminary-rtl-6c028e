// spi_tx: SPI sender of packets to the peer board.
//
// For each packet it drives the select line cs_n low, shifts out the 32-bit
// header and then the M-bit body, most significant bit first, one bit per
// SCK period, and raises cs_n again, so the select line frames the packet.
// SPI mode 0: mosi changes while sck is low and is sampled by the receiver on
// the rising edge. SCK runs at CLK/(2*HALF); HALF = 2 gives 25 MHz from a
// 100 MHz clock, the nearest integer ratio to the 24 MHz of the design. cs_n
// stays high for GAP clocks between packets.
//
// Interface: packets in with valid/ready, pkt = {header, body}. A packet
// takes (32+M)*2*HALF + about 2*HALF + GAP clocks. Framing by cs_n and
// MSB-first order follow the reference design; the SPI mode and the clock ratio are
// this design's choice.
module spi_tx #(
  parameter int unsigned M    = 512,
  parameter int unsigned HALF = 2,
  parameter int unsigned GAP  = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M+31:0] pkt,
  output logic          sck,
  output logic          cs_n,
  output logic          mosi
);

  localparam int unsigned NBIT = M + 32;
  localparam int unsigned BW   = $clog2(NBIT + 1);
  localparam int unsigned HW   = $clog2(HALF + GAP + 1);

  typedef enum logic [1:0] {IDLE, SETUP, SHIFT, GAP_S} state_e;
  state_e        state;
  logic [M+31:0] shreg;
  logic [BW-1:0] left;
  logic [HW-1:0] timer;

  assign in_ready = (state == IDLE);
  assign mosi     = shreg[M+31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      shreg <= '0;
      left  <= '0;
      timer <= '0;
      sck   <= 1'b0;
      cs_n  <= 1'b1;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          shreg <= pkt;
          left  <= BW'(NBIT);
          cs_n  <= 1'b0;
          timer <= HW'(HALF - 1);
          state <= SETUP;
        end
        SETUP: begin                       // first bit set up for half a period
          if (timer == '0) begin
            sck   <= 1'b1;
            timer <= HW'(HALF - 1);
            state <= SHIFT;
          end else timer <= timer - 1'b1;
        end
        SHIFT: begin
          if (timer == '0) begin
            timer <= HW'(HALF - 1);
            if (sck) begin                 // falling edge: next bit
              sck   <= 1'b0;
              shreg <= shreg << 1;
              left  <= left - 1'b1;
              if (left == BW'(1)) begin
                cs_n  <= 1'b1;
                timer <= HW'(GAP - 1);
                state <= GAP_S;
              end
            end else begin
              sck <= 1'b1;
            end
          end else timer <= timer - 1'b1;
        end
        GAP_S: begin
          if (timer == '0) state <= IDLE;
          else timer <= timer - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
