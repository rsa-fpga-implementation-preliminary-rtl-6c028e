// tb_packet_fifo: random pushes and pops on a 3-deep buffer (not a power of
// two) compared with a queue model: order, data, count, full/empty and the
// overflow pulse when a write is offered while full.
module tb_packet_fifo;
  localparam int unsigned W = 16, DEPTH = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, overflow;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, novf = 0;
  logic [W-1:0] model [$];

  packet_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 2) == 1;
      out_ready = ($urandom % 3) == 0;
      in_data   = 16'($urandom);
      #1;
      checks++;
      if (count != model.size() || out_valid != (model.size() != 0) ||
          in_ready != (model.size() < DEPTH)) begin
        failures++;
        $display("FAIL state count=%0d model=%0d", count, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && model.size() < DEPTH + ((out_valid && out_ready) ? 1 : 0) && in_ready)
        model.push_back(in_data);
      else if (in_valid) novf++;
    end
    checks++;
    if (novf == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
