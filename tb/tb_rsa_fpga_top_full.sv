// tb_rsa_fpga_top_full: one board at its default size (RSA-512, 256-bit
// primes) with its SPI output looped back to its SPI input and its own
// public key used as the peer's. A computer model sends one 512-bit data
// packet over the 12 MBaud UART in "both" switch mode; the board must return
// the ciphertext, equal to m^(2^16+1) mod N, followed by the plaintext, with
// the header unchanged. Also checks N = p*q against a value computed
// offline and reports the cycle counts of key derivation and of the
// packet's round trip.
module tb_rsa_fpga_top_full;
  import rsa_pkg::*;
  localparam int unsigned M = 512;
  localparam int unsigned CLK_HZ = 100_000_000, BAUD = 12_000_000;
  localparam int unsigned NB = M / 8 + 4;
  localparam logic [M-1:0] N_EXP =
    512'hbb81ebdb1ea3b275796f4ab9a7d6753df0a0e43600cd6eb8c012bf03a25287d074cf4a5da0f20f6db4438370efe7182c2571522b8671475ea89843f6ac149e61;

  logic clk = 0, rst_n = 0;
  logic rxd = 1, txd;
  logic sck, cs_n, mosi;
  logic [M-1:0] pub_n;
  logic pub_valid, keys_ready, key_ok, stalled, link_overflow, rx_overflow, ferr, short_fr;
  int checks = 0, failures = 0;
  longint cyc = 0;

  rsa_fpga_top dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .sw_mode(2'(OUT_BOTH)),
    .spi_out_sck(sck), .spi_out_cs_n(cs_n), .spi_out_mosi(mosi),
    .spi_in_sck(sck), .spi_in_cs_n(cs_n), .spi_in_mosi(mosi),
    .pub_n, .pub_valid, .peer_n(pub_n), .peer_valid(pub_valid),
    .keys_ready, .key_ok, .uart_frame_err(ferr), .spi_short_frame(short_fr),
    .stalled, .link_overflow, .rx_overflow
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [M-1:0] ref_pow(input logic [M-1:0] bb, input logic [M-1:0] ee,
                                           input logic [M-1:0] nn);
    logic [2*M-1:0] acc, base;
    acc = 1;
    base = (2*M)'(bb) % (2*M)'(nn);
    for (int i = 0; i < M; i++) begin
      if (ee[i]) acc = (acc * base) % (2*M)'(nn);
      base = (base * base) % (2*M)'(nn);
    end
    return acc[M-1:0];
  endfunction

  task automatic uart_byte(input logic [7:0] b);
    logic [9:0] fr;
    longint t0;
    fr = {1'b1, b, 1'b0};
    t0 = cyc;
    for (int i = 0; i < 10; i++) begin
      rxd = fr[i];
      while (cyc < t0 + (longint'(i + 1) * CLK_HZ) / BAUD) @(negedge clk);
    end
  endtask

  logic [M+31:0] got [$];
  initial begin
    logic [M+31:0] p;
    logic [7:0] b;
    longint t0;
    forever begin
      p = '0;
      for (int n = 0; n < NB; n++) begin
        @(negedge txd);
        t0 = cyc;
        for (int i = 0; i < 9; i++) begin
          while (cyc < t0 + (longint'(2 * i + 1) * CLK_HZ) / (2 * BAUD)) @(posedge clk);
          #1;
          if (i > 0) b[i-1] = txd;
        end
        p = {p[M+23:0], b};
      end
      got.push_back(p);
    end
  end

  initial begin
    header_t h;
    logic [M-1:0] body;
    logic [M+31:0] p;
    longint t_keys, t_sent;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (keys_ready);
    t_keys = cyc;
    $display("key derivation: %0d cycles", t_keys);
    check(pub_n == N_EXP, "N = p*q");
    check(key_ok, "inverses exist");
    h = '0;
    h.data = 1; h.tid = 8'h2a; h.pkt_num = 8'd0; h.len_m1 = 9'(M / 8 - 1);
    body = {16{$urandom}} % pub_n;
    p = {h, body};
    for (int i = 0; i < NB; i++) uart_byte(p[M+31-8*i -: 8]);
    t_sent = cyc;
    while (got.size() < 2 && cyc - t_sent < 20000000) @(negedge clk);
    $display("round trip after the last byte: %0d cycles", cyc - t_sent);
    check(got.size() == 2, "two packets back");
    if (got.size() == 2) begin
      check(got[0] == {h, ref_pow(body, M'(PUBLIC_EXP), pub_n)}, "ciphertext");
      check(got[1] == p, "plaintext");
    end
    check(!link_overflow && !rx_overflow && !ferr && !short_fr, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
