// tb_uart_out_arbiter: checks the three switch modes (plain only, cipher
// only, cipher then plain, with raw packets sent once), that a stall signal
// is sent on clog only after the packet in progress, that data waits while
// a signal is due, and that unstall follows drain.
module tb_uart_out_arbiter;
  import rsa_pkg::*;
  localparam int unsigned M = 64;
  logic clk = 0, rst_n = 0;
  out_mode_e mode = OUT_DECRYPTED;
  logic clog = 0, drain = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, stalled;
  logic [M+31:0] plain_pkt = '0, cipher_pkt = '0, out_pkt;
  int checks = 0, failures = 0;
  logic [M+31:0] got [$];

  uart_out_arbiter #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_pkt);
  always @(negedge clk) out_ready = ($urandom % 4) == 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input logic [M+31:0] pl, input logic [M+31:0] ci);
    @(negedge clk);
    plain_pkt = pl; cipher_pkt = ci; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_next(input logic [M+31:0] p, input string what);
    while (got.size() == 0) @(negedge clk);
    checks++;
    if (got[0] != p) begin failures++; $display("FAIL %s: %h", what, got[0]); end
    void'(got.pop_front());
  endtask

  localparam logic [M+31:0] STALL_P   = {32'(SIG_STALL) << 7, 64'd0};
  localparam logic [M+31:0] UNSTALL_P = {32'(SIG_UNSTALL) << 7, 64'd0};

  initial begin
    logic [M+31:0] pl, ci, raw_p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pl = {32'h0000_0081, 64'h1}; ci = {32'h0000_0081, 64'h2};
    raw_p = {32'h0000_0085, 64'h3};
    mode = OUT_DECRYPTED; offer(pl, ci); expect_next(pl, "decrypted mode");
    mode = OUT_ENCRYPTED; offer(pl, ci); expect_next(ci, "encrypted mode");
    mode = OUT_BOTH;      offer(pl, ci); expect_next(ci, "both: cipher");
    expect_next(pl, "both: plain");
    offer(raw_p, raw_p); expect_next(raw_p, "both: raw once");
    // stall after the packet in progress
    offer(pl, ci);
    @(negedge clk);
    clog = 1;
    expect_next(ci, "packet before stall");
    expect_next(pl, "packet before stall 2");
    expect_next(STALL_P, "stall signal");
    checks++;
    if (!stalled) begin failures++; $display("FAIL stalled flag"); end
    clog = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL extra output"); end
    drain = 1;
    expect_next(UNSTALL_P, "unstall signal");
    drain = 0;
    checks++;
    if (stalled) begin failures++; $display("FAIL stalled flag after unstall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
