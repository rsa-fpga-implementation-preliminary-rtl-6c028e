// mod_exp: modular exponentiation x^e mod N by repeated squaring, with every
// multiplication done as a Montgomery product.
//
// Three phases:
//  1. Entry into Montgomery form. Bit-serially, by Horner's rule with one
//     conditional subtraction per step, it computes base = x*R mod N and
//     prod = R mod N (the Montgomery form of 1) over 2M cycles. This also
//     reduces an x that is not below N.
//  2. Right-to-left square and multiply over the exponent bits, LSB first:
//     if the bit is 1, prod <- REDC(prod * base); then base <- REDC(base^2).
//     The loop ends as soon as no set exponent bit is left, and the squaring
//     after the last set bit is skipped, so a short exponent such as
//     2^16 + 1 costs 16 squarings and 2 multiplications.
//  3. Exit from Montgomery form: result = REDC(prod * 1).
// Needs N odd and N' = N^-1 mod 2^M (see montgomery_mult).
//
// Interface: valid/ready on both sides; n, n_prime and the exponent are
// captured with x. Timing: 2M + 2 cycles for phase 1, then about 3M + 12
// cycles per Montgomery product. The square-and-multiply loop and the use of
// Montgomery products follow the reference design; the bit-serial conversion into
// Montgomery form and the early exit are this design's choice.
module mod_exp #(
  parameter int unsigned M = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] x,
  input  logic [M-1:0] e,
  input  logic [M-1:0] n,
  input  logic [M-1:0] n_prime,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M-1:0] result
);

  localparam int unsigned CW = $clog2(2 * M + 1);

  typedef enum logic [2:0] {IDLE, TO_MONT, LOOP, MUL_REQ, MUL_WAIT, FROM_REQ, FROM_WAIT, DONE} state_e;
  typedef enum logic [1:0] {OP_MUL, OP_SQR} op_e;
  state_e state;
  op_e    op;

  logic [M-1:0]   rn, rnp, ex, base, prod;
  logic [2*M-1:0] sh_x;     // shifts x then M zeros into the base accumulator
  logic [CW-1:0]  count;

  // one Horner step: v <- (2v + bit) mod N, with v < N on entry
  function automatic logic [M-1:0] dbl_mod(input logic [M-1:0] v, input logic bit_in,
                                           input logic [M-1:0] nn);
    logic [M:0] w;
    w = {v, bit_in};
    if (w >= {1'b0, nn}) w = w - {1'b0, nn};
    return w[M-1:0];
  endfunction

  logic         mm_in_valid, mm_in_ready, mm_out_valid;
  logic [M-1:0] mm_a, mm_b, mm_res;

  montgomery_mult #(.M(M)) u_mm (
    .clk, .rst_n,
    .in_valid(mm_in_valid), .in_ready(mm_in_ready),
    .a(mm_a), .b(mm_b), .n(rn), .n_prime(rnp),
    .out_valid(mm_out_valid), .out_ready(1'b1),
    .result(mm_res)
  );

  always_comb begin
    mm_in_valid = (state == MUL_REQ) || (state == FROM_REQ);
    if (state == FROM_REQ || state == FROM_WAIT) begin
      mm_a = prod;
      mm_b = M'(1);
    end else if (op == OP_MUL) begin
      mm_a = prod;
      mm_b = base;
    end else begin
      mm_a = base;
      mm_b = base;
    end
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      op    <= OP_MUL;
      rn <= '0; rnp <= '0; ex <= '0; base <= '0; prod <= '0;
      sh_x <= '0; count <= '0; result <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          rn     <= n;
          rnp    <= n_prime;
          ex     <= e;
          sh_x   <= {x, {M{1'b0}}};
          base   <= '0;
          prod   <= '0;
          count  <= CW'(2 * M);
          state  <= TO_MONT;
        end
        TO_MONT: begin
          // base: the bits of x, then M zeros; prod: the single bit 1, then M zeros
          base   <= dbl_mod(base, sh_x[2*M-1], rn);
          prod   <= dbl_mod(prod, count == CW'(M + 1), rn);
          sh_x   <= sh_x << 1;
          count  <= count - 1'b1;
          if (count == CW'(1)) state <= LOOP;
        end
        LOOP: begin
          if (ex == '0) begin
            state <= FROM_REQ;
          end else if (ex[0]) begin
            op    <= OP_MUL;
            state <= MUL_REQ;
          end else begin
            op    <= OP_SQR;
            state <= MUL_REQ;
          end
        end
        MUL_REQ: if (mm_in_ready) state <= MUL_WAIT;
        MUL_WAIT: if (mm_out_valid) begin
          if (op == OP_MUL) begin
            prod <= mm_res;
            if (ex[M-1:1] == '0) begin
              ex    <= '0;           // no set bit left: skip the final squaring
              state <= LOOP;
            end else begin
              op    <= OP_SQR;
              state <= MUL_REQ;
            end
          end else begin
            base  <= mm_res;
            ex    <= ex >> 1;
            state <= LOOP;
          end
        end
        FROM_REQ: if (mm_in_ready) state <= FROM_WAIT;
        FROM_WAIT: if (mm_out_valid) begin result <= mm_res; state <= DONE; end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
