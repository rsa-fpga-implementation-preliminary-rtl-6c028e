// tb_uart_rx_bridge: feeds byte streams for 64-bit-body packets: data
// packets (12 bytes, MSB first) must come out whole; a signal header (data
// flag 0, 4 bytes) must be swallowed without disturbing the next packet;
// a packet completing while the previous one is not taken must pulse
// overflow.
module tb_uart_rx_bridge;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, out_ready = 1, overflow;
  logic [7:0] in_byte = '0;
  logic [M+31:0] pkt;
  int checks = 0, failures = 0, novf = 0;
  logic [M+31:0] got [$];

  uart_rx_bridge #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) got.push_back(pkt);
    if (rst_n && overflow) novf++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bytes(input logic [M+31:0] p, input int nb);
    for (int i = 0; i < nb; i++) begin
      @(negedge clk);
      in_byte = p[M+31-8*i -: 8];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  initial begin
    logic [M+31:0] p1, p2, sig;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p1  = {32'h0123_4581, 64'hdead_beef_0bad_cafe};   // data flag set
    sig = {32'h0000_0080, 64'd0};                     // signal, tid 1
    p2  = {32'h8000_0003, 64'h1111_2222_3333_4444};
    send_bytes(p1, 12);
    send_bytes(sig, 4);
    send_bytes(p2, 12);
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != 2) begin failures++; $display("FAIL count %0d", got.size()); end
    else begin
      checks += 2;
      if (got[0] != p1) begin failures++; $display("FAIL p1 %h", got[0]); end
      if (got[1] != p2) begin failures++; $display("FAIL p2 %h", got[1]); end
    end
    out_ready = 0;
    send_bytes(p1, 12);
    send_bytes(p2, 12);
    repeat (3) @(negedge clk);
    checks += 2;
    if (novf != 1) begin failures++; $display("FAIL overflow %0d", novf); end
    if (pkt != p1) begin failures++; $display("FAIL held packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
