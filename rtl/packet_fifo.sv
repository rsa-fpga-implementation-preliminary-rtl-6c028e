// packet_fifo: first-in first-out buffer of whole packets.
//
// The boards buffer packets between the UART or SPI receivers and the RSA
// engine, whose exponentiation is much slower than the links. It is a
// circular buffer of DEPTH entries, written as an array, with read and write
// pointers that carry a wrap bit so that full and empty can be told apart;
// count reports the fill level, which drives the stall and unstall signals.
// A write offered while full is not taken and pulses overflow: a source that
// can wait holds it, a source that cannot (the SPI receiver) loses it.
//
// Interface: valid/ready on both sides; the head entry is shown on out_data
// while out_valid is high (first-word fall-through). Latency one clock from
// write to out_valid. The reference design only says that the board has limited
// memory for incoming packets; the structure and the depth are this
// design's choice.
module packet_fifo #(
  parameter int unsigned W     = 544,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_wr, do_rd;

  localparam int unsigned CW = $clog2(DEPTH + 1);
  assign count     = (wp[AW] == rp[AW]) ? CW'(wp[AW-1:0]) - CW'(rp[AW-1:0])
                                        : CW'(DEPTH) - CW'(rp[AW-1:0]) + CW'(wp[AW-1:0]);
  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW:0] bump(input logic [AW:0] ptr);
    if (ptr[AW-1:0] == AW'(DEPTH - 1)) return {~ptr[AW], {AW{1'b0}}};
    return ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= in_valid && !in_ready;
      if (do_wr) wp <= bump(wp);
      if (do_rd) rp <= bump(rp);
    end
  end

  // the pointers never pass each other
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
