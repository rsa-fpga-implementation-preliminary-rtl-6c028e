// rsa_fpga_top: one board of the two-board RSA link.
//
// Two boards, each attached to a computer over a USB-UART, talk over a pair
// of SPI links, one per direction. A board
//  * derives its RSA key pair at reset from two fixed primes P and Q
//    (key_derivation) and publishes its modulus N; it receives the peer's
//    modulus on peer_n and derives the Montgomery constant for it;
//  * takes packets from its computer (uart_rx, uart_rx_bridge) into an input
//    buffer (packet_fifo), encrypts each body with the peer's public key
//    (packet_crypt) and sends the packet to the peer (spi_tx);
//  * takes packets from the peer (spi_rx) into a link buffer, decrypts each
//    body with its private key (second packet_crypt), and sends the plaintext,
//    the ciphertext or both, as the switches sw_mode select, to its computer
//    (uart_out_arbiter, uart_tx_bridge, uart_tx);
//  * tells its computer to stop sending with a stall signal when the input
//    buffer holds STALL_LEVEL packets, and to resume with an unstall signal
//    once the buffer is empty.
// Each packet is a 32-bit header plus an M-bit body; headers pass through
// the RSA engine unchanged. Both directions run at once (full duplex).
//
// Interface: UART lines to the computer, the two SPI links, the switches,
// the public-key exchange (pub_n/pub_valid out, peer_n/peer_valid in),
// keys_ready, and pulses for packets lost on a full link buffer
// (link_overflow) or a full UART bridge (rx_overflow). Timing: key
// derivation runs once after reset, dominated by two extended-Euclid runs at
// M+1 bits; an encryption with e = 2^16+1 costs about 19 Montgomery
// products, a decryption up to 2M. The data path and the protocols follow
// the reference design; how the peer's public key reaches the board, the buffer
// depths and the stall thresholds are this design's choice.
module rsa_fpga_top #(
  parameter int unsigned   M           = 512,
  parameter logic [M/2-1:0] P          = 256'hf014afe2d268c85f9e73d3e3400daa737ba525b0c698428f7a3f9eefead1ea19,
  parameter logic [M/2-1:0] Q          = 256'hc7f0d0b782e0698248748a293072368f8bc7e01e1e7e92b3d643ec4281d9ef89,
  parameter int unsigned   CLK_HZ      = 100_000_000,
  parameter int unsigned   BAUD        = 12_000_000,
  parameter int unsigned   SPI_HALF    = 2,
  parameter int unsigned   IN_DEPTH    = 4,
  parameter int unsigned   LINK_DEPTH  = 4,
  parameter int unsigned   STALL_LEVEL = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // computer side
  input  logic          uart_rxd,
  output logic          uart_txd,
  input  logic [1:0]    sw_mode,
  // link to the peer
  output logic          spi_out_sck,
  output logic          spi_out_cs_n,
  output logic          spi_out_mosi,
  input  logic          spi_in_sck,
  input  logic          spi_in_cs_n,
  input  logic          spi_in_mosi,
  // public key exchange
  output logic [M-1:0]  pub_n,
  output logic          pub_valid,
  input  logic [M-1:0]  peer_n,
  input  logic          peer_valid,
  // status
  output logic          keys_ready,
  output logic          key_ok,        // both modular inverses existed
  output logic          uart_frame_err,
  output logic          spi_short_frame,
  output logic          stalled,
  output logic          link_overflow,
  output logic          rx_overflow
);
  import rsa_pkg::*;

  localparam int unsigned PW = M + 32;

  // ---------------- key derivation ----------------
  logic [M-1:0] phi, d, n_prime, peer_n_prime;

  key_derivation #(.M(M)) u_keys (
    .clk, .rst_n, .p(P), .q(Q),
    .peer_n, .peer_valid,
    .n(pub_n), .phi, .d, .n_prime, .peer_n_prime,
    .pub_valid, .keys_valid(keys_ready), .ok(key_ok)
  );

  // ---------------- computer -> peer ----------------
  logic          rx_byte_valid;
  logic [7:0]    rx_byte;
  logic          br_valid, br_ready;
  logic [PW-1:0] br_pkt;
  logic          inq_valid, inq_ready, inq_ovf;
  logic [PW-1:0] inq_pkt;
  logic [$clog2(IN_DEPTH+1)-1:0] inq_count;
  logic          enc_valid, enc_ready;
  logic [PW-1:0] enc_pkt, enc_src;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_rx (
    .clk, .rst_n, .rxd(uart_rxd),
    .out_valid(rx_byte_valid), .data(rx_byte), .frame_err(uart_frame_err)
  );

  uart_rx_bridge #(.M(M)) u_rx_bridge (
    .clk, .rst_n, .in_valid(rx_byte_valid), .in_byte(rx_byte),
    .out_valid(br_valid), .out_ready(br_ready), .pkt(br_pkt), .overflow(rx_overflow)
  );

  packet_fifo #(.W(PW), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid(br_valid), .in_ready(br_ready), .in_data(br_pkt),
    .out_valid(inq_valid), .out_ready(inq_ready), .out_data(inq_pkt),
    .count(inq_count), .overflow(inq_ovf)
  );

  packet_crypt #(.M(M)) u_encrypt (
    .clk, .rst_n, .key_valid(keys_ready),
    .n(peer_n), .n_prime(peer_n_prime), .exponent(M'(PUBLIC_EXP)),
    .in_valid(inq_valid), .in_ready(inq_ready), .in_pkt(inq_pkt),
    .out_valid(enc_valid), .out_ready(enc_ready), .out_pkt(enc_pkt), .src_pkt(enc_src)
  );

  spi_tx #(.M(M), .HALF(SPI_HALF)) u_spi_tx (
    .clk, .rst_n, .in_valid(enc_valid), .in_ready(enc_ready), .pkt(enc_pkt),
    .sck(spi_out_sck), .cs_n(spi_out_cs_n), .mosi(spi_out_mosi)
  );

  // ---------------- peer -> computer ----------------
  logic          srx_valid;
  logic [PW-1:0] srx_pkt;
  logic          lq_valid, lq_ready, lq_in_ready;
  logic [PW-1:0] lq_pkt;
  logic [$clog2(LINK_DEPTH+1)-1:0] lq_count;
  logic          dec_valid, dec_ready;
  logic [PW-1:0] dec_pkt, dec_src;
  logic          arb_valid, arb_ready;
  logic [PW-1:0] arb_pkt;
  logic          txb_valid, txb_ready;
  logic [7:0]    txb_byte;

  spi_rx #(.M(M)) u_spi_rx (
    .clk, .rst_n, .sck(spi_in_sck), .cs_n(spi_in_cs_n), .mosi(spi_in_mosi),
    .out_valid(srx_valid), .pkt(srx_pkt), .short_frame(spi_short_frame)
  );

  packet_fifo #(.W(PW), .DEPTH(LINK_DEPTH)) u_link_fifo (
    .clk, .rst_n,
    .in_valid(srx_valid), .in_ready(lq_in_ready), .in_data(srx_pkt),
    .out_valid(lq_valid), .out_ready(lq_ready), .out_data(lq_pkt),
    .count(lq_count), .overflow(link_overflow)
  );

  packet_crypt #(.M(M)) u_decrypt (
    .clk, .rst_n, .key_valid(keys_ready),
    .n(pub_n), .n_prime(n_prime), .exponent(d),
    .in_valid(lq_valid), .in_ready(lq_ready), .in_pkt(lq_pkt),
    .out_valid(dec_valid), .out_ready(dec_ready), .out_pkt(dec_pkt), .src_pkt(dec_src)
  );

  uart_out_arbiter #(.M(M)) u_arb (
    .clk, .rst_n, .mode(out_mode_e'(sw_mode)),
    .clog(inq_count >= ($clog2(IN_DEPTH+1))'(STALL_LEVEL)),
    .drain(inq_count == '0),
    .in_valid(dec_valid), .in_ready(dec_ready),
    .plain_pkt(dec_pkt), .cipher_pkt(dec_src),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_pkt(arb_pkt),
    .stalled
  );

  uart_tx_bridge #(.M(M)) u_tx_bridge (
    .clk, .rst_n, .in_valid(arb_valid), .in_ready(arb_ready), .pkt(arb_pkt),
    .out_valid(txb_valid), .out_ready(txb_ready), .out_byte(txb_byte)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_tx (
    .clk, .rst_n, .in_valid(txb_valid), .in_ready(txb_ready), .data(txb_byte),
    .txd(uart_txd)
  );

endmodule
