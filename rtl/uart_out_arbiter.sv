// uart_out_arbiter: chooses what the board sends to its computer.
//
// Two kinds of traffic share the one UART to the computer:
//  * packets from the peer, as decrypted plaintext, as the ciphertext that
//    came over the link, or both (ciphertext first), chosen by the board's
//    switches (mode). A packet that was not encrypted (raw flag or signal)
//    is sent once even in "both" mode.
//  * the flow-control signals for the computer's own uploads. When the input
//    buffer reports clog, the stall signal is sent; once it reports drain,
//    the unstall signal follows. Signals are headers with data flag 0 and the
//    signal kind in the transmission ID.
// Signals are only inserted between packets, so a stall goes out after the
// packet being sent has finished. Signals take priority over data.
//
// Interface: decrypted packets in with valid/ready (plain and cipher side by
// side); packets out with valid/ready to the UART bridge. stalled shows that
// a stall is in force. The switch modes and the stall/unstall behaviour
// follow the reference design; the priority rule and the clog/drain thresholds are
// this design's choice.
module uart_out_arbiter #(
  parameter int unsigned M = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rsa_pkg::out_mode_e mode,
  input  logic          clog,
  input  logic          drain,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M+31:0] plain_pkt,
  input  logic [M+31:0] cipher_pkt,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [M+31:0] out_pkt,
  output logic          stalled
);
  import rsa_pkg::*;

  typedef enum logic [1:0] {IDLE, SEND, SEND_PLAIN} state_e;
  state_e  state;
  header_t chdr;
  logic [M+31:0] plain_hold;

  assign chdr      = header_t'(cipher_pkt[M+31:M]);
  assign out_valid = (state != IDLE);
  assign in_ready  = (state == IDLE) && !(clog && !stalled) && !(drain && stalled);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      stalled    <= 1'b0;
      out_pkt    <= '0;
      plain_hold <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (clog && !stalled) begin
            out_pkt <= {signal_header(SIG_STALL), {M{1'b0}}};
            stalled <= 1'b1;
            state   <= SEND;
          end else if (drain && stalled) begin
            out_pkt <= {signal_header(SIG_UNSTALL), {M{1'b0}}};
            stalled <= 1'b0;
            state   <= SEND;
          end else if (in_valid) begin
            plain_hold <= plain_pkt;
            if (mode == OUT_ENCRYPTED) begin
              out_pkt <= cipher_pkt;
              state   <= SEND;
            end else if (mode == OUT_BOTH && chdr.data && !chdr.raw) begin
              out_pkt <= cipher_pkt;
              state   <= SEND_PLAIN;
            end else begin
              out_pkt <= plain_pkt;
              state   <= SEND;
            end
          end
        end
        SEND: if (out_ready) state <= IDLE;
        SEND_PLAIN: if (out_ready) begin
          out_pkt <= plain_hold;
          state   <= SEND;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // valid/ready rule: a presented packet stays, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_pkt));

endmodule
