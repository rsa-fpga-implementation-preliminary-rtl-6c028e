// divider: unsigned W-bit restoring divider giving quotient and remainder.
//
// The modular inverse calls it once per step of the Euclidean algorithm.
// It runs one quotient bit per clock, most significant first: the partial
// remainder is shifted left by one with the next dividend bit, and the
// divisor is subtracted when it fits. A division takes W cycles plus one to
// load. Division by zero is not guarded: the Euclidean loop that uses it
// stops before its divisor reaches zero.
//
// Interface: valid/ready on both sides, as in the AXI-stream style the
// control FSMs use. The reference design says only that a divider supplies quotient
// and remainder; the restoring algorithm is this design's choice.
module divider #(
  parameter int unsigned W = 513
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e        state;
  logic [W-1:0]  dvs;
  logic [CW-1:0] count;
  logic [W:0]    trial;       // shifted partial remainder, one bit wider
  logic [W:0]    diff;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_comb begin
    trial = {remainder, quotient[W-1]};
    diff  = trial - {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      dvs       <= '0;
      count     <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          dvs       <= divisor;
          quotient  <= dividend;   // dividend bits shift out as quotient bits shift in
          remainder <= '0;
          count     <= CW'(W);
          state     <= RUN;
        end
        RUN: begin
          if (!diff[W]) begin
            remainder <= diff[W-1:0];
            quotient  <= {quotient[W-2:0], 1'b1};
          end else begin
            remainder <= trial[W-1:0];
            quotient  <= {quotient[W-2:0], 1'b0};
          end
          count <= count - 1'b1;
          if (count == CW'(1)) state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
