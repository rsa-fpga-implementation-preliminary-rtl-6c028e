// tb_spi_tx: sends 96-bit packets (64-bit body) and samples mosi on each
// rising sck edge while cs_n is low, as a mode-0 receiver would. Checks the
// bits (MSB first), the bit count per frame, the SCK period of 2*HALF clocks
// and that cs_n rises between packets.
module tb_spi_tx;
  localparam int unsigned M = 64, HALF = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, sck, cs_n, mosi;
  logic [M+31:0] pkt = '0;
  int checks = 0, failures = 0;
  longint cyc = 0, last_rise = 0;
  int nbits = 0, nframes = 0, bad_period = 0;
  logic [M+31:0] shreg;
  logic [M+31:0] got [$];
  logic sck_d = 0, cs_d = 1;

  spi_tx #(.M(M), .HALF(HALF)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    sck_d <= sck;
    cs_d  <= cs_n;
    if (rst_n && !cs_n && sck && !sck_d) begin
      shreg = {shreg[M+30:0], mosi};
      if (nbits > 0 && cyc - last_rise != 2 * HALF) bad_period++;
      last_rise = cyc;
      nbits++;
    end
    if (rst_n && cs_n && !cs_d) begin
      nframes++;
      if (nbits != M + 32) begin failures++; $display("FAIL bits %0d", nbits); end
      got.push_back(shreg);
      nbits = 0;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M+31:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      pkt = {$urandom, $urandom, $urandom};
      sent.push_back(pkt);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (!in_ready) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL frames %0d", got.size()); end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin failures++; $display("FAIL packet %0d", i); end
    end
    checks++;
    if (bad_period != 0) begin failures++; $display("FAIL sck period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
