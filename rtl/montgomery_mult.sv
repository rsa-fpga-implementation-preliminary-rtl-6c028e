// montgomery_mult: Montgomery product a * b * R^-1 mod N, with R = 2^M.
//
// It forms the full product x = a*b and applies Montgomery reduction:
//   m = ((x mod R) * N') mod R      with N' = N^-1 mod R
//   t = (x - m*N) / R               (exact: x - m*N is a multiple of R)
//   result = t < 0 ? t + N : t
// Because R is a power of two, "mod R" keeps the low M bits and "/ R" drops
// them, so no division by N is ever needed. For a, b < N the result is in
// [0, N). The three products are made one after another on a single M-bit
// sequential shift-add multiplier, so one Montgomery product takes at most
// about 3*(M+2) + 6 cycles.
//
// Interface: valid/ready on both sides; n and n_prime must be stable while
// a product is in flight. The reduction formula is the reference design's; the
// sequential multiplier and the scheduling are this design's choice, made to
// keep area small.
module montgomery_mult #(
  parameter int unsigned M = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] n,
  input  logic [M-1:0] n_prime,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M-1:0] result
);

  typedef enum logic [2:0] {IDLE, P1, W1, P2, W2, P3, W3, DONE} state_e;
  state_e state;

  logic [2*M-1:0] x;       // a*b
  logic [M-1:0]   mq;      // m
  logic [M-1:0]   op_a, op_b, ra, rb;
  logic           mul_in_valid, mul_in_ready, mul_out_valid, mul_out_ready;
  logic [2*M-1:0] mul_p;

  seq_multiplier #(.W(M)) u_mul (
    .clk, .rst_n,
    .in_valid(mul_in_valid), .in_ready(mul_in_ready),
    .a(op_a), .b(op_b),
    .out_valid(mul_out_valid), .out_ready(mul_out_ready),
    .p(mul_p)
  );

  always_comb begin
    mul_in_valid  = (state == P1) || (state == P2) || (state == P3);
    mul_out_ready = (state == W1) || (state == W2) || (state == W3);
    unique case (state)
      P1, W1:  begin op_a = ra;           op_b = rb;      end
      P2, W2:  begin op_a = x[M-1:0];     op_b = n_prime; end
      default: begin op_a = n;            op_b = mq;      end
    endcase
  end

  // t = (x - m*N) / R as a signed (M+1)-bit number
  logic signed [2*M:0] diff;
  logic signed [M:0]   t;
  logic signed [M:0]   t_fix;
  assign diff  = $signed({1'b0, x}) - $signed({1'b0, mul_p});
  assign t     = diff[2*M:M];
  assign t_fix = t[M] ? t + $signed({1'b0, n}) : t;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      x      <= '0;
      mq     <= '0;
      ra     <= '0;
      rb     <= '0;
      result <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin ra <= a; rb <= b; state <= P1; end
        P1:   if (mul_in_ready) state <= W1;
        W1:   if (mul_out_valid) begin x <= mul_p; state <= P2; end
        P2:   if (mul_in_ready) state <= W2;
        W2:   if (mul_out_valid) begin mq <= mul_p[M-1:0]; state <= P3; end
        P3:   if (mul_in_ready) state <= W3;
        W3:   if (mul_out_valid) begin result <= t_fix[M-1:0]; state <= DONE; end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
