// tb_divider: random quotients and remainders of the restoring divider
// checked against the simulator's '/' and '%', with the latency (W+2 cycles).
module tb_divider;
  localparam int unsigned W = 33;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [W-1:0] dividend = '0, divisor = '1, quotient, remainder;
  int checks = 0, failures = 0;

  divider #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    dividend = x; divisor = y; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (quotient != x / y || remainder != x % y) begin
      failures++;
      $display("FAIL %h / %h = %h r %h", x, y, quotient, remainder);
    end
    checks++;
    if (cyc != W) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('1, 33'd1);
    run('1, '1);
    run(33'd5, 33'd7);
    run({1'b1, 32'd0}, 33'd65537);
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] x, y;
      x = {$urandom, $urandom};
      y = W'({$urandom, $urandom}) >> ($urandom % W);
      if (y == '0) y = 1;
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
