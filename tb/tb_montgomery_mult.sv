// tb_montgomery_mult: Montgomery products modulo a 64-bit RSA modulus.
// The result r must satisfy r < N and r * 2^64 = a*b (mod N), checked with
// the simulator's own '%'. Also checks the cycle budget (<= 3*(M+2)+8).
module tb_montgomery_mult;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [M-1:0] a = '0, b = '0;
  logic [M-1:0] n = 64'hb7858d24f3fcc79f, n_prime = 64'h01c7816821f6945f;
  logic [M-1:0] result;
  int checks = 0, failures = 0;

  montgomery_mult #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [2*M-1:0] lhs, rhs;
    int cyc;
    @(negedge clk);
    a = x; b = y; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    lhs = {result, 64'd0} % 128'(n);
    rhs = (128'(x) * 128'(y)) % 128'(n);
    checks++;
    if (lhs != rhs || result >= n) begin
      failures++;
      $display("FAIL mont(%h, %h) = %h", x, y, result);
    end
    checks++;
    if (cyc > 3 * (M + 2) + 8) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, 64'd5);
    run(64'd1, 64'd1);
    run(n - 1, n - 1);
    for (int i = 0; i < 100; i++) run({$urandom, $urandom} % n, {$urandom, $urandom} % n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
