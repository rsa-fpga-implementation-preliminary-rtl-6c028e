// tb_rsa_fpga_top: end-to-end test of two boards wired to each other, with
// 64-bit keys (two 32-bit primes per board) so that it runs quickly.
//
// Each board's SPI output drives the other's SPI input and each publishes
// its modulus to the other. Two computer models speak 8N1 UART at 12 MBaud:
// they send packets, obey stall/unstall signals and parse what comes back.
// Phases:
//  1. keys: both boards derive keys; N must equal p*q.
//  2. "decrypted" switch mode: a START packet, two data packets and a raw
//     packet from computer A must reach computer B unchanged.
//  3. "both" mode: B must receive the ciphertext, equal to m^e mod N_B, and
//     then the plaintext; "encrypted" mode: only the ciphertext.
//  4. a burst of 8 packets: board A must stall and later unstall its
//     computer; board B's link buffer may overflow, and every packet must be
//     either delivered intact and in order, or counted as lost.
//  5. the other direction: computer B sends a packet to computer A.
// Each mechanism (stall, unstall, raw bypass, each switch mode, START
// packet, link overflow, reverse direction) is counted and must occur.
module tb_rsa_fpga_top;
  import rsa_pkg::*;
  localparam int unsigned M = 64;
  localparam int unsigned CLK_HZ = 100_000_000, BAUD = 12_000_000;
  localparam logic [31:0] PA = 32'hc50c51bf, QA = 32'hee6d4221;
  localparam logic [31:0] PB = 32'hd43e7297, QB = 32'he7cb8813;
  localparam int unsigned NB = M / 8 + 4;

  logic clk = 0, rst_n = 0;
  logic a_rxd = 1, a_txd, b_rxd = 1, b_txd;
  logic [1:0] a_mode = OUT_DECRYPTED, b_mode = OUT_DECRYPTED;
  logic ab_sck, ab_cs, ab_mosi, ba_sck, ba_cs, ba_mosi;
  logic [M-1:0] a_n, b_n;
  logic a_pubv, b_pubv, a_keys, b_keys, a_ok, b_ok;
  logic a_stalled, b_stalled, a_lovf, b_lovf, a_rovf, b_rovf;
  logic a_ferr, b_ferr, a_short, b_short;
  int checks = 0, failures = 0;
  longint cyc = 0;

  rsa_fpga_top #(.M(M), .P(PA), .Q(QA)) board_a (
    .clk, .rst_n, .uart_rxd(a_rxd), .uart_txd(a_txd), .sw_mode(a_mode),
    .spi_out_sck(ab_sck), .spi_out_cs_n(ab_cs), .spi_out_mosi(ab_mosi),
    .spi_in_sck(ba_sck), .spi_in_cs_n(ba_cs), .spi_in_mosi(ba_mosi),
    .pub_n(a_n), .pub_valid(a_pubv), .peer_n(b_n), .peer_valid(b_pubv),
    .keys_ready(a_keys), .key_ok(a_ok), .uart_frame_err(a_ferr), .spi_short_frame(a_short),
    .stalled(a_stalled), .link_overflow(a_lovf), .rx_overflow(a_rovf)
  );
  rsa_fpga_top #(.M(M), .P(PB), .Q(QB)) board_b (
    .clk, .rst_n, .uart_rxd(b_rxd), .uart_txd(b_txd), .sw_mode(b_mode),
    .spi_out_sck(ba_sck), .spi_out_cs_n(ba_cs), .spi_out_mosi(ba_mosi),
    .spi_in_sck(ab_sck), .spi_in_cs_n(ab_cs), .spi_in_mosi(ab_mosi),
    .pub_n(b_n), .pub_valid(b_pubv), .peer_n(a_n), .peer_valid(a_pubv),
    .keys_ready(b_keys), .key_ok(b_ok), .uart_frame_err(b_ferr), .spi_short_frame(b_short),
    .stalled(b_stalled), .link_overflow(b_lovf), .rx_overflow(b_rovf)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_stall = 0, n_unstall = 0, n_raw = 0, n_start = 0, n_link_ovf = 0, n_reverse = 0;
  int n_mode_dec = 0, n_mode_enc = 0, n_mode_both = 0;
  always @(posedge clk) if (rst_n && b_lovf) n_link_ovf++;

  initial begin
    #60000000;
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
    base = 128'(bb) % 128'(nn);
    for (int i = 0; i < M; i++) begin
      if (ee[i]) acc = (acc * base) % 128'(nn);
      base = (base * base) % 128'(nn);
    end
    return acc[M-1:0];
  endfunction

  // ---------------- computer models: UART line drivers and receivers ----------------
  task automatic uart_byte(ref logic line, input logic [7:0] b);
    logic [9:0] fr;
    longint t0;
    fr = {1'b1, b, 1'b0};
    t0 = cyc;
    for (int i = 0; i < 10; i++) begin
      line = fr[i];
      while (cyc < t0 + (longint'(i + 1) * CLK_HZ) / BAUD) @(negedge clk);
    end
  endtask

  logic [M+31:0] rx_a [$], rx_b [$];   // packets received by computer A / B
  bit a_held = 0;                      // computer A has been told to stall

  task automatic uart_listen(ref logic line, input bit is_a);
    logic [M+31:0] p;
    header_t h;
    longint t0;
    logic [7:0] b;
    int nbytes;
    forever begin
      nbytes = 0;
      p = '0;
      do begin
        @(negedge line);
        t0 = cyc;
        for (int i = 0; i < 9; i++) begin
          while (cyc < t0 + (longint'(2 * i + 1) * CLK_HZ) / (2 * BAUD)) @(posedge clk);
          #1;
          if (i > 0) b[i-1] = line;
        end
        p = {p[M+23:0], b};
        nbytes++;
        h = header_t'(p[31:0]);
      end while (!(nbytes == 4 && !h.data) && nbytes != NB);
      if (nbytes == 4) p = {p[31:0], {M{1'b0}}};
      h = header_t'(p[M+31:M]);
      if (!h.data) begin
        if (is_a && h.tid == SIG_STALL)   begin n_stall++;   a_held = 1; end
        if (is_a && h.tid == SIG_UNSTALL) begin n_unstall++; a_held = 0; end
      end else if (is_a) rx_a.push_back(p);
      else rx_b.push_back(p);
    end
  endtask

  initial uart_listen(a_txd, 1'b1);
  initial uart_listen(b_txd, 1'b0);

  task automatic send_a(input logic [M+31:0] p);
    while (a_held) @(negedge clk);
    for (int i = 0; i < NB; i++) uart_byte(a_rxd, p[M+31-8*i -: 8]);
  endtask

  function automatic logic [M+31:0] mkpkt(input logic [7:0] tid, input logic [7:0] num,
                                         input bit start, input bit raw, input logic [M-1:0] body);
    header_t h;
    h = '0;
    h.data = 1'b1; h.start = start; h.raw = raw; h.tid = tid; h.pkt_num = num;
    h.len_m1 = 9'(M / 8 - 1);
    return {h, body};
  endfunction

  task automatic wait_rx_b(input int n);
    longint t0;
    t0 = cyc;
    while (rx_b.size() < n && cyc - t0 < 400000) @(negedge clk);
  endtask

  initial begin
    logic [M+31:0] p, burst [$];
    logic [M-1:0] body;
    int k;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // 1. keys
    wait (a_keys && b_keys);
    check(a_n == 64'(PA) * 64'(QA) && b_n == 64'(PB) * 64'(QB), "moduli");
    check(a_ok && b_ok, "keys derived");
    // 2. decrypted mode, START, data and raw packets
    b_mode = OUT_DECRYPTED;
    p = mkpkt(8'd7, 8'd0, 1, 0, {8'h01, 8'h00, 16'd5, 32'd0});   // START: type 1, 5 packets
    send_a(p); wait_rx_b(1);
    check(rx_b.size() == 1 && rx_b[0] == p, "START packet delivered");
    if (rx_b.size() > 0 && rx_b[0][M+1]) n_start++;
    void'(rx_b.pop_front());
    for (k = 1; k <= 2; k++) begin
      p = mkpkt(8'd7, 8'(k), 0, 0, {$urandom, $urandom} % b_n);
      send_a(p); wait_rx_b(1);
      check(rx_b.size() == 1 && rx_b[0] == p, "data packet, decrypted mode");
      if (rx_b.size() == 1 && rx_b[0] == p) n_mode_dec++;
      void'(rx_b.pop_front());
    end
    p = mkpkt(8'd7, 8'd3, 0, 1, 64'hfeed_face_cafe_f00d);
    send_a(p); wait_rx_b(1);
    check(rx_b.size() == 1 && rx_b[0] == p, "raw packet");
    if (rx_b.size() == 1 && rx_b[0] == p) n_raw++;
    void'(rx_b.pop_front());
    // 3. both, then encrypted
    b_mode = OUT_BOTH;
    body = {$urandom, $urandom} % b_n;
    p = mkpkt(8'd7, 8'd4, 0, 0, body);
    send_a(p); wait_rx_b(2);
    check(rx_b.size() == 2, "both: two packets");
    if (rx_b.size() == 2) begin
      check(rx_b[0] == {p[M+31:M], ref_pow(body, 64'd65537, b_n)}, "both: ciphertext");
      check(rx_b[1] == p, "both: plaintext");
      if (rx_b[0] == {p[M+31:M], ref_pow(body, 64'd65537, b_n)} && rx_b[1] == p) n_mode_both++;
    end
    rx_b.delete();
    b_mode = OUT_ENCRYPTED;
    body = {$urandom, $urandom} % b_n;
    p = mkpkt(8'd8, 8'd0, 0, 0, body);
    send_a(p); wait_rx_b(1);
    check(rx_b.size() == 1 && rx_b[0] == {p[M+31:M], ref_pow(body, 64'd65537, b_n)}, "encrypted mode");
    if (rx_b.size() == 1) n_mode_enc++;
    rx_b.delete();
    // 4. burst
    b_mode = OUT_DECRYPTED;
    for (k = 0; k < 8; k++) begin
      p = mkpkt(8'd9, 8'(k), k == 0, 0, {$urandom, $urandom} % b_n);
      burst.push_back(p);
      send_a(p);
    end
    begin
      longint t0;
      t0 = cyc;
      while (rx_b.size() + n_link_ovf < 8 && cyc - t0 < 2000000) @(negedge clk);
      repeat (5000) @(negedge clk);
    end
    check(rx_b.size() + n_link_ovf == 8, $sformatf("burst: %0d delivered, %0d lost", rx_b.size(), n_link_ovf));
    k = 0;
    foreach (rx_b[i]) begin
      while (k < 8 && burst[k] != rx_b[i]) k++;
      check(k < 8, "burst packet delivered intact and in order");
    end
    if (rx_b.size() > 0) n_mode_dec++;
    rx_b.delete();
    // 5. reverse direction
    a_mode = OUT_DECRYPTED;
    p = mkpkt(8'd10, 8'd0, 0, 0, {$urandom, $urandom} % a_n);
    for (int i = 0; i < NB; i++) uart_byte(b_rxd, p[M+31-8*i -: 8]);
    begin
      longint t0;
      t0 = cyc;
      while (rx_a.size() < 1 && cyc - t0 < 400000) @(negedge clk);
    end
    check(rx_a.size() == 1 && rx_a[0] == p, "reverse direction");
    if (rx_a.size() == 1 && rx_a[0] == p) n_reverse++;
    check(!a_held && !a_stalled, "A unstalled at the end");
    // mechanism coverage
    $display("mechanisms: stall=%0d unstall=%0d raw=%0d start=%0d link_overflow=%0d reverse=%0d dec=%0d enc=%0d both=%0d",
             n_stall, n_unstall, n_raw, n_start, n_link_ovf, n_reverse, n_mode_dec, n_mode_enc, n_mode_both);
    check(n_stall > 0, "stall happened");
    check(n_unstall > 0, "unstall happened");
    check(n_raw > 0, "raw bypass happened");
    check(n_start > 0, "START packet happened");
    check(n_link_ovf > 0, "link overflow happened");
    check(n_reverse > 0, "reverse direction happened");
    check(n_mode_dec > 0 && n_mode_enc > 0 && n_mode_both > 0, "all switch modes happened");
    check(!a_ferr && !b_ferr && !a_short && !b_short && !a_rovf && !b_rovf, "no line errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
