// tb_uart_tx_bridge: data packets must leave as 12 bytes (4 header, 8
// body, MSB first) and signal packets as their 4 header bytes only, under a
// randomly stalling byte consumer.
module tb_uart_tx_bridge;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [M+31:0] pkt = '0;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  uart_tx_bridge #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_byte);
  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [M+31:0] p);
    @(negedge clk);
    pkt = p; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    pkt = '0;
  endtask

  initial begin
    logic [7:0] exp_q [$];
    logic [M+31:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      p = {$urandom, $urandom, $urandom};
      if (k % 3 == 1) p[M] = 1'b0; else p[M] = 1'b1;   // data flag
      send(p);
      for (int i = 0; i < (p[M] ? 12 : 4); i++) exp_q.push_back(p[M+31-8*i -: 8]);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin failures++; $display("FAIL count %0d vs %0d", got.size(), exp_q.size()); end
    foreach (exp_q[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp_q[i]) begin failures++; $display("FAIL byte %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
