// uart_tx_bridge: splits packets into bytes for the UART transmitter.
//
// It sends the 32-bit header and then, for a data packet, the M-bit body,
// most significant byte first. A signal (data flag 0) is sent as its header
// alone, since signals carry no body.
//
// Interface: packets in with valid/ready, pkt = {header, body}; bytes out
// with valid/ready to uart_tx. A packet of M bits takes M/8 + 4 byte slots.
// The packet format follows the reference design; the byte order is this design's
// choice, matched by uart_rx_bridge.
module uart_tx_bridge #(
  parameter int unsigned M = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M+31:0] pkt,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [7:0]    out_byte
);
  import rsa_pkg::*;

  localparam int unsigned NB = M / 8 + 4;
  localparam int unsigned CW = $clog2(NB + 1);

  logic [M+31:0] shreg;
  logic [CW-1:0] left;      // bytes still to send
  header_t       hdr;

  assign hdr = header_t'(pkt[M+31:M]);

  assign in_ready  = (left == '0);
  assign out_valid = (left != '0);
  assign out_byte  = shreg[M+31:M+24];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (left == '0) begin
      if (in_valid) begin
        shreg <= pkt;
        left  <= hdr.data ? CW'(NB) : CW'(4);
      end
    end else if (out_ready) begin
      shreg <= shreg << 8;
      left  <= left - 1'b1;
    end
  end

endmodule
