// uart_rx_bridge: assembles bytes from the computer into packets.
//
// A packet arrives as its 32-bit header followed, for a data packet, by an
// M-bit body, both most significant byte first. The bridge shifts the bytes
// into a (32+M)-bit register, reads the data flag from the fourth byte to
// learn whether a body follows, and on the last byte copies the packet to its
// output register. Packets whose data flag is 0 (signals) carry no body and
// are not forwarded: signals only travel from the board to the computer.
// If the previous packet is still waiting in the output register when a new
// one completes, the new one is dropped and overflow pulses; the stall
// signal protocol is meant to keep this from happening.
//
// Interface: bytes in as a one-clock valid pulse; packets out with
// valid/ready, pkt = {header, body}. The header layout and the M-bit body
// follow the reference design; the byte order and the dropping rules are this
// design's choice.
module uart_rx_bridge #(
  parameter int unsigned M = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_byte,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [M+31:0] pkt,
  output logic          overflow
);
  import rsa_pkg::*;

  localparam int unsigned NB = M / 8 + 4;          // bytes in a data packet
  localparam int unsigned CW = $clog2(NB + 1);

  logic [M+31:0] shreg;
  logic [CW-1:0] nbytes;
  header_t       hdr_now;

  // header as it stands once the fourth byte is in
  assign hdr_now = header_t'({shreg[23:0], in_byte});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      nbytes    <= '0;
      pkt       <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid) begin
        shreg  <= {shreg[M+23:0], in_byte};
        nbytes <= nbytes + 1'b1;
        if (nbytes == CW'(3) && !hdr_now.data) begin
          nbytes <= '0;                        // signal packet: no body, dropped
        end else if (nbytes == CW'(NB - 1)) begin
          nbytes <= '0;
          if (out_valid && !out_ready) begin
            overflow <= 1'b1;
          end else begin
            pkt       <= {shreg[M+23:0], in_byte};
            out_valid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
