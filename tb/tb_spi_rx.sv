// tb_spi_rx: drives mode-0 SPI frames of 96 bits (64-bit body) at a quarter
// of the system clock, MSB first under cs_n, and checks each packet
// delivered; then a frame cut short by cs_n, which must be discarded with
// short_frame, followed by a good frame that must still be received.
module tb_spi_rx;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic sck = 0, cs_n = 1, mosi = 0, out_valid, short_frame;
  logic [M+31:0] pkt;
  int checks = 0, failures = 0, nshort = 0;
  logic [M+31:0] got [$];

  spi_rx #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && out_valid) got.push_back(pkt);
    if (rst_n && short_frame) nshort++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [M+31:0] p, input int nb);
    @(negedge clk);
    cs_n = 0;
    for (int i = 0; i < nb; i++) begin
      mosi = p[M+31-i];
      repeat (2) @(negedge clk);
      sck = 1;
      repeat (2) @(negedge clk);
      sck = 0;
    end
    repeat (2) @(negedge clk);
    cs_n = 1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [M+31:0] sent [$];
    logic [M+31:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      p = {$urandom, $urandom, $urandom};
      sent.push_back(p);
      frame(p, M + 32);
    end
    frame({$urandom, $urandom, $urandom}, 40);
    p = {$urandom, $urandom, $urandom};
    sent.push_back(p);
    frame(p, M + 32);
    repeat (10) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL count %0d", got.size()); end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin failures++; $display("FAIL packet %0d", i); end
    end
    checks++;
    if (nshort != 1) begin failures++; $display("FAIL short frames %0d", nshort); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
