// tb_packet_crypt: two units back to back with the 64-bit test key, the
// first raising bodies to e = 2^16+1 and the second to d. Checks the
// ciphertext against a plain modular power, that the header survives both
// stages, that the round trip restores the body, that raw and signal
// packets pass both stages untouched, and that nothing is accepted before
// key_valid.
module tb_packet_crypt;
  import rsa_pkg::*;
  localparam int unsigned M = 64;
  localparam logic [M-1:0] N  = 64'hb7858d24f3fcc79f;
  localparam logic [M-1:0] NP = 64'h01c7816821f6945f;
  localparam logic [M-1:0] D  = 64'h567d4444c6d48e81;
  logic clk = 0, rst_n = 0, key_valid = 0;
  logic in_valid = 0, in_ready, mid_valid, mid_ready, out_valid, out_ready = 1;
  logic [M+31:0] in_pkt = '0, mid_pkt, mid_src, out_pkt, out_src;
  int checks = 0, failures = 0;
  logic [M+31:0] mids [$], outs [$];

  packet_crypt #(.M(M)) u_enc (
    .clk, .rst_n, .key_valid, .n(N), .n_prime(NP), .exponent(M'(PUBLIC_EXP)),
    .in_valid, .in_ready, .in_pkt,
    .out_valid(mid_valid), .out_ready(mid_ready), .out_pkt(mid_pkt), .src_pkt(mid_src)
  );
  packet_crypt #(.M(M)) u_dec (
    .clk, .rst_n, .key_valid, .n(N), .n_prime(NP), .exponent(D),
    .in_valid(mid_valid), .in_ready(mid_ready), .in_pkt(mid_pkt),
    .out_valid, .out_ready, .out_pkt, .src_pkt(out_src)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && mid_valid && mid_ready) mids.push_back(mid_pkt);
    if (rst_n && out_valid && out_ready) outs.push_back(out_pkt);
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_pow(input logic [M-1:0] bb, input logic [M-1:0] ee);
    logic [2*M-1:0] acc, base;
    acc = 1;
    base = 128'(bb) % 128'(N);
    for (int i = 0; i < M; i++) begin
      if (ee[i]) acc = (acc * base) % 128'(N);
      base = (base * base) % 128'(N);
    end
    return acc[M-1:0];
  endfunction

  task automatic send(input logic [M+31:0] p);
    @(negedge clk);
    in_pkt = p; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    logic [M+31:0] sent [$];
    logic [M+31:0] p;
    header_t h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    in_pkt = {32'h1, 64'd42};
    in_valid = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (in_ready || mids.size() != 0) begin failures++; $display("FAIL accepted before key_valid"); end
    in_valid = 0;
    key_valid = 1;
    for (int k = 0; k < 8; k++) begin
      h = header_t'($urandom);
      h.data = (k != 5);
      h.raw  = (k == 3);
      p = {h, ({$urandom, $urandom} % N)};
      sent.push_back(p);
      send(p);
    end
    wait (outs.size() == sent.size());
    foreach (sent[i]) begin
      h = header_t'(sent[i][M+31:M]);
      checks += 3;
      if (mids[i][M+31:M] != sent[i][M+31:M]) begin failures++; $display("FAIL header kept %0d", i); end
      if (h.data && !h.raw) begin
        if (mids[i][M-1:0] != ref_pow(sent[i][M-1:0], 64'd65537)) begin failures++; $display("FAIL cipher %0d", i); end
      end else if (mids[i] != sent[i]) begin failures++; $display("FAIL bypass %0d", i); end
      if (outs[i] != sent[i]) begin failures++; $display("FAIL round trip %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
