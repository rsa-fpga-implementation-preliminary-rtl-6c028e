// tb_uart_tx: sends bytes at 12 MBaud from a 100 MHz clock and decodes the
// line independently: after each falling start edge the line is sampled at
// the centre of every bit, placed at (i + 1/2) * CLK_HZ/BAUD clocks. Checks
// start bit, data bits, stop bit, and that a frame lasts 10 bit times.
module tb_uart_tx;
  localparam int unsigned CLK_HZ = 100_000_000, BAUD = 12_000_000;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, txd;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // receiver model
  logic [7:0] got [$];
  initial begin
    longint t0;
    logic [7:0] b;
    forever begin
      @(negedge txd);
      t0 = cyc;
      for (int i = 0; i < 10; i++) begin
        while (cyc < t0 + (longint'(2 * i + 1) * CLK_HZ) / (2 * BAUD)) @(posedge clk);
        #1;
        if (i == 0) check(txd == 1'b0, "start bit");
        else if (i == 9) check(txd == 1'b1, "stop bit");
        else b[i-1] = txd;
      end
      got.push_back(b);
    end
  end

  initial begin
    logic [7:0] sent [$];
    longint ts;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      data = (k == 0) ? 8'h00 : (k == 1) ? 8'hff : 8'($urandom);
      sent.push_back(data);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      ts = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!in_ready) @(negedge clk);
      // one frame: 10 bits of 100/12 clocks, i.e. 83 or 84 clocks
      check((cyc - ts) >= 83 && (cyc - ts) <= 85, $sformatf("frame length %0d", cyc - ts));
    end
    repeat (100) @(negedge clk);
    check(got.size() == sent.size(), "byte count");
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
