// seq_multiplier: unsigned W x W -> 2W multiplier, one multiplier bit per clock.
//
// The RSA datapath avoids full-width single-cycle products, which are far too
// large for a mid-size FPGA at these widths; this shift-and-add unit trades
// time for area. Each cycle it adds the shifted multiplicand when the low
// multiplier bit is set, then shifts the multiplicand left and the multiplier
// right. It stops as soon as the remaining multiplier is zero, so a product
// takes (index of the highest set bit of b) + 1 cycles, at most W, plus one
// cycle to return to idle.
//
// Interface: valid/ready in the AXI-stream style on both sides. A request
// (a, b) is taken when in_valid && in_ready; the product is held on p with
// out_valid high until out_ready. The reference design names a multiplier for
// p*q and (p-1)(q-1); the shift-add structure and handshake are this
// design's choice.
module seq_multiplier #(
  parameter int unsigned W = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [2*W-1:0] p
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e         state;
  logic [2*W-1:0] mcand;
  logic [W-1:0]   mplier;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      mcand  <= '0;
      mplier <= '0;
      p      <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          mcand  <= {{W{1'b0}}, a};
          mplier <= b;
          p      <= '0;
          state  <= RUN;
        end
        RUN: begin
          if (mplier == '0) begin
            state <= DONE;
          end else begin
            if (mplier[0]) p <= p + mcand;
            mcand  <= mcand << 1;
            mplier <= mplier >> 1;
          end
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
