// tb_mod_exp: modular exponentiation modulo a 64-bit RSA modulus. Random
// bases and exponents are checked against a plain square-and-multiply with
// the simulator's '%'; an RSA round trip (m^e then ^d) must return m; the
// public exponent 2^16+1 must finish within 19 Montgomery products plus the
// conversion into Montgomery form.
module tb_mod_exp;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [M-1:0] x = '0, e = '0;
  logic [M-1:0] n = 64'hb7858d24f3fcc79f, n_prime = 64'h01c7816821f6945f;
  logic [M-1:0] d = 64'h567d4444c6d48e81;
  logic [M-1:0] result;
  int checks = 0, failures = 0;
  int last_cycles;

  mod_exp #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_pow(input logic [M-1:0] bb, input logic [M-1:0] ee);
    logic [2*M-1:0] acc, base;
    acc  = 1;
    base = 128'(bb) % 128'(n);
    for (int i = 0; i < M; i++) begin
      if (ee[i]) acc = (acc * base) % 128'(n);
      base = (base * base) % 128'(n);
    end
    return acc[M-1:0];
  endfunction

  task automatic run(input logic [M-1:0] bb, input logic [M-1:0] ee, output logic [M-1:0] r);
    @(negedge clk);
    x = bb; e = ee; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    last_cycles = 0;
    while (!out_valid) begin @(negedge clk); last_cycles++; end
    r = result;
    checks++;
    if (r != ref_pow(bb, ee)) begin
      failures++;
      $display("FAIL %h ^ %h = %h, expected %h", bb, ee, r, ref_pow(bb, ee));
    end
  endtask

  initial begin
    logic [M-1:0] c, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64'd2, 64'd0, c);
    run(64'd0, 64'd5, c);
    run('1, 64'd3, c);                 // base above N is reduced first
    run(64'h0123_4567_89ab_cdef, 64'd65537, c);
    checks++;
    if (last_cycles > 2 * M + 19 * (3 * (M + 2) + 12)) begin
      failures++;
      $display("FAIL public-exponent latency %0d", last_cycles);
    end
    run(c, d, p);
    checks++;
    if (p != 64'h0123_4567_89ab_cdef) begin failures++; $display("FAIL round trip %h", p); end
    for (int i = 0; i < 20; i++) run({$urandom, $urandom}, {$urandom, $urandom}, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
