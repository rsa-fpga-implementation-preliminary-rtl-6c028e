// uart_tx: 8N1 UART transmitter (one start bit, 8 data bits LSB first, one
// stop bit, idle high).
//
// The bit clock comes from a fractional phase accumulator: every system
// clock adds BAUD, and a bit boundary falls when the sum passes CLK_HZ. At
// 100 MHz and 12 MBaud the bit lengths alternate between 8 and 9 clocks and
// average exactly 12 MBaud, which a plain integer divider cannot reach.
//
// Interface: byte valid/ready; a byte is taken when in_valid && in_ready and
// in_ready stays low until its stop bit has been sent (10 bit times). The
// 8N1 format and the 12 MBaud rate follow the reference design; the accumulator is
// this design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 12_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] data,
  output logic       txd
);

  localparam int unsigned AW = $clog2(CLK_HZ + BAUD + 1);

  logic          busy;
  logic [9:0]    shreg;     // stop, data[7:0], start: sent LSB first
  logic [3:0]    nbits;
  logic [AW-1:0] acc;
  logic          tick;

  assign tick     = (acc + AW'(BAUD)) >= AW'(CLK_HZ);
  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      shreg <= '1;
      nbits <= '0;
      acc   <= '0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (in_valid) begin
        busy  <= 1'b1;
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        acc   <= '0;
        txd   <= 1'b0;          // start bit begins now
      end
    end else begin
      acc <= tick ? acc + AW'(BAUD) - AW'(CLK_HZ) : acc + AW'(BAUD);
      if (tick) begin
        shreg <= {1'b1, shreg[9:1]};
        nbits <= nbits - 1'b1;
        if (nbits == 4'd1) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          txd <= shreg[1];
        end
      end
    end
  end

endmodule
