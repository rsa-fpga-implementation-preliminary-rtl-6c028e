// tb_seq_multiplier: random and corner-case products of the shift-add
// multiplier checked against the simulator's own '*', plus the cycle bound
// (at most W + 2 cycles from acceptance to result).
module tb_seq_multiplier;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  seq_multiplier #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    a = x; b = y; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (p !== (2*W)'(x) * (2*W)'(y) || 64'(p) != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL %h * %h = %h", x, y, p);
    end
    checks++;
    if (cyc > W + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, 32'h1234);
    run(32'hffff_ffff, 32'hffff_ffff);
    run(32'h8000_0000, 32'h8000_0001);
    run(32'd7, '0);
    for (int i = 0; i < 200; i++) run($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
