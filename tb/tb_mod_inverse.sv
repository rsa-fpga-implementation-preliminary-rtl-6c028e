// tb_mod_inverse: inverses modulo 2^64 (as used for N') and modulo an even
// phi (as used for d), checked by multiplying back: a * inv mod m == 1.
// Also a case without an inverse (gcd > 1), which must clear ok.
module tb_mod_inverse;
  localparam int unsigned W = 65;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [W-1:0] a = '0, m = '0, inv;
  logic ok;
  int checks = 0, failures = 0;

  mod_inverse #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] mm, input logic expect_ok);
    logic [2*W-1:0] prod;
    @(negedge clk);
    a = x; m = mm; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (ok != expect_ok) begin failures++; $display("FAIL ok %b for %h mod %h", ok, x, mm); end
    if (expect_ok) begin
      prod = ((2*W)'(x) * (2*W)'(inv)) % (2*W)'(mm);
      checks++;
      if (prod != 1 || inv >= mm) begin
        failures++;
        $display("FAIL inv(%h) mod %h = %h", x, mm, inv);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // d = e^-1 mod phi for the 64-bit test key (phi = (p-1)(q-1))
    run(65'd65537, 65'(64'(32'hc50c51be) * 64'(32'hee6d4220)), 1'b1);
    // N' = N^-1 mod 2^64
    run(65'h0_b785_8d24_f3fc_c79f, {1'b1, 64'd0}, 1'b1);
    run(65'd1, {1'b1, 64'd0}, 1'b1);
    run(65'd6, 65'd9, 1'b0);
    for (int i = 0; i < 40; i++) begin
      logic [63:0] x;
      x = {$urandom, $urandom} | 64'd1;
      run({1'b0, x}, {1'b1, 64'd0}, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
