// tb_key_derivation: derives the 64-bit test key pair from two 32-bit primes
// and checks every output by an independent relation: N = p*q,
// phi = (p-1)(q-1), e*d mod phi = 1, N*N' mod 2^64 = 1 and the same for the
// peer's modulus, plus the published-key and done flags. The expected d and
// N' were also computed offline and are compared literally.
module tb_key_derivation;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic [M/2-1:0] p = 32'hc50c51bf, q = 32'hee6d4221;
  logic [M-1:0]   peer_n = 64'hc02d17bc0c3fb935;
  logic           peer_valid = 0;
  logic [M-1:0]   n, phi, d, n_prime, peer_n_prime;
  logic           pub_valid, keys_valid, ok;
  int checks = 0, failures = 0;

  key_derivation #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [2*M-1:0] t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (pub_valid);
    @(negedge clk);
    check(n == 64'(p) * 64'(q), "N = p*q");
    repeat (20000) @(negedge clk);
    check(!keys_valid, "waits for the peer modulus");
    peer_valid = 1;
    wait (keys_valid);
    @(negedge clk);
    check(phi == 64'(p - 1) * 64'(q - 1), "phi");
    t = (128'(d) * 128'(65537)) % 128'(phi);
    check(t == 1, "e*d mod phi == 1");
    check(d < phi, "d < phi");
    check(d == 64'h567d4444c6d48e81, "d literal");
    t = 128'(n) * 128'(n_prime);
    check(t[M-1:0] == 64'd1, "N*N' mod R == 1");
    check(n_prime == 64'h01c7816821f6945f, "N' literal");
    t = 128'(peer_n) * 128'(peer_n_prime);
    check(t[M-1:0] == 64'd1, "peer N*N' mod R == 1");
    check(ok, "ok");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
