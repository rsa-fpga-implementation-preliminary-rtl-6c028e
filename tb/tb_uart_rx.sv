// tb_uart_rx: drives 8N1 frames at 12 MBaud with bit edges placed at
// i * CLK_HZ/BAUD clocks, back to back, and checks the bytes received, then
// a frame whose stop bit is low (must raise frame_err, not deliver a byte).
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 100_000_000, BAUD = 12_000_000;
  logic clk = 0, rst_n = 0;
  logic rxd = 1, out_valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int nerr = 0;
  longint cyc = 0;
  logic [7:0] got [$];

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) got.push_back(data);
    if (rst_n && frame_err) nerr++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] fr;
    longint t0;
    fr = {stop, b, 1'b0};
    t0 = cyc;
    for (int i = 0; i < 10; i++) begin
      rxd = fr[i];
      while (cyc < t0 + (longint'(i + 1) * CLK_HZ) / BAUD) @(negedge clk);
    end
    rxd = 1;
  endtask

  initial begin
    logic [7:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hff : 8'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
    end
    repeat (50) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL count %0d %h %h %h", got.size(), got[0], got[1], sent[0]); end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin failures++; $display("FAIL byte %0d", i); end
    end
    send(8'h5a, 1'b0);
    repeat (100) @(negedge clk);
    checks++;
    if (nerr != 1 || got.size() != sent.size()) begin failures++; $display("FAIL framing error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
