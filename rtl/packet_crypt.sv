// packet_crypt: RSA encryption or decryption of one packet body.
//
// The board has two of these: the encryptor raises a body to the peer's
// public exponent e modulo the peer's N, the decryptor raises it to the
// board's private exponent d modulo its own N. The body goes through
// mod_exp; the 32-bit header is kept aside and reattached to the result
// unchanged. Packets that are signals (data flag 0) or carry the raw flag
// bypass the exponentiation and come out as they went in. The unit accepts a
// packet only once key_valid is high, that is, after key derivation.
//
// Interface: packets in and out with valid/ready, pkt = {header, body};
// src_pkt holds the packet as it came in, so that the output stage can send
// the ciphertext next to the plaintext. One packet at a time; latency that
// of mod_exp plus two clocks, or two clocks for a bypassed packet. Header
// preservation follows the reference design; the raw-flag bypass is this design's
// reading of the raw flag.
module packet_crypt #(
  parameter int unsigned M = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          key_valid,
  input  logic [M-1:0]  n,
  input  logic [M-1:0]  n_prime,
  input  logic [M-1:0]  exponent,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M+31:0] in_pkt,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [M+31:0] out_pkt,
  output logic [M+31:0] src_pkt
);
  import rsa_pkg::*;

  typedef enum logic [1:0] {IDLE, REQ, WAIT, DONE} state_e;
  state_e  state;
  header_t hdr;

  logic         me_in_valid, me_in_ready, me_out_valid;
  logic [M-1:0] me_res;

  assign hdr = header_t'(in_pkt[M+31:M]);

  mod_exp #(.M(M)) u_exp (
    .clk, .rst_n,
    .in_valid(me_in_valid), .in_ready(me_in_ready),
    .x(src_pkt[M-1:0]), .e(exponent), .n, .n_prime,
    .out_valid(me_out_valid), .out_ready(1'b1),
    .result(me_res)
  );

  assign me_in_valid = (state == REQ);
  assign in_ready    = (state == IDLE) && key_valid;
  assign out_valid   = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      src_pkt <= '0;
      out_pkt <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid && key_valid) begin
          src_pkt <= in_pkt;
          if (hdr.data && !hdr.raw) begin
            state <= REQ;
          end else begin
            out_pkt <= in_pkt;
            state   <= DONE;
          end
        end
        REQ:  if (me_in_ready) state <= WAIT;
        WAIT: if (me_out_valid) begin
          out_pkt <= {src_pkt[M+31:M], me_res};
          state   <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // valid/ready rule: a presented packet stays, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_pkt));

endmodule
