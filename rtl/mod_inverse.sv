// mod_inverse: a^-1 mod m by the extended Euclidean algorithm.
//
// Key derivation uses it for the private exponent d = e^-1 mod (p-1)(q-1)
// and for the Montgomery constant N' = N^-1 mod R (R = 2^M). Each step of
// the algorithm asks the sequential divider for the quotient q and remainder
// of r0 / r1, then the sequential multiplier for q * |t1|, and updates
//   (r0, r1) <- (r1, r0 mod r1),   (t0, t1) <- (t1, t0 - q*t1).
// When r1 reaches zero, r0 is gcd(a, m); the inverse exists when it is 1 and
// is t0, brought into [0, m) by adding m when negative. The t values stay
// within +-m, so they are kept as (W+2)-bit two's complement numbers.
//
// Interface: valid/ready on both sides. inv and ok (gcd == 1) are held with
// out_valid until out_ready. Timing: each step costs W+2 cycles in the
// divider plus (bit length of q)+2 in the multiplier and a few control
// cycles; the number of steps is that of the Euclidean algorithm on (m, a).
// The reference design gives the algorithm and the use of a divider; the step
// scheduling and the number formats are this design's.
module mod_inverse #(
  parameter int unsigned W = 513
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] a,
  input  logic [W-1:0] m,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] inv,
  output logic         ok
);

  typedef enum logic [2:0] {IDLE, CHECK, DIV_REQ, DIV_WAIT, MUL_REQ, MUL_WAIT, FINISH, DONE} state_e;
  state_e state;

  logic [W-1:0]       r0, r1, mod_q, qt;
  logic signed [W+1:0] t0, t1;
  logic [W-1:0]       t1_mag;

  // divider
  logic         div_in_valid, div_in_ready, div_out_valid;
  logic [W-1:0] div_q, div_r;
  // multiplier
  logic           mul_in_valid, mul_in_ready, mul_out_valid;
  logic [2*W-1:0] mul_p;

  assign t1_mag = t1[W+1] ? W'(-t1) : W'(t1);

  divider #(.W(W)) u_div (
    .clk, .rst_n,
    .in_valid(div_in_valid), .in_ready(div_in_ready),
    .dividend(r0), .divisor(r1),
    .out_valid(div_out_valid), .out_ready(state == DIV_WAIT),
    .quotient(div_q), .remainder(div_r)
  );

  seq_multiplier #(.W(W)) u_mul (
    .clk, .rst_n,
    .in_valid(mul_in_valid), .in_ready(mul_in_ready),
    .a(t1_mag), .b(qt),
    .out_valid(mul_out_valid), .out_ready(state == MUL_WAIT),
    .p(mul_p)
  );

  assign div_in_valid = (state == DIV_REQ);
  assign mul_in_valid = (state == MUL_REQ);
  assign in_ready     = (state == IDLE);
  assign out_valid    = (state == DONE);

  logic signed [W+1:0] prod_s;
  assign prod_s = t1[W+1] ? -$signed(mul_p[W+1:0]) : $signed(mul_p[W+1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      r0 <= '0; r1 <= '0; t0 <= '0; t1 <= '0;
      mod_q <= '0; qt <= '0; inv <= '0; ok <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          r0    <= m;
          r1    <= a;
          mod_q <= m;
          t0    <= '0;
          t1    <= (W+2)'(1);
          state <= CHECK;
        end
        CHECK: state <= (r1 == '0) ? FINISH : DIV_REQ;
        DIV_REQ: if (div_in_ready) state <= DIV_WAIT;
        DIV_WAIT: if (div_out_valid) begin
          qt    <= div_q;
          r0    <= r1;
          r1    <= div_r;
          state <= MUL_REQ;
        end
        MUL_REQ: if (mul_in_ready) state <= MUL_WAIT;
        MUL_WAIT: if (mul_out_valid) begin
          t0    <= t1;
          t1    <= t0 - prod_s;
          state <= CHECK;
        end
        FINISH: begin
          ok    <= (r0 == W'(1));
          inv   <= t0[W+1] ? W'(t0 + $signed({2'b00, mod_q})) : W'(t0);
          state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
