// key_derivation: derives the RSA key pair and Montgomery constants at start-up.
//
// From two fixed primes p and q of M/2 bits it computes, one after another:
//   N   = p * q                 (shared M/2-bit sequential multiplier)
//   phi = (p-1) * (q-1)         (same multiplier)
//   d   = e^-1 mod phi          (extended Euclid, e = 2^16 + 1)
//   N'  = N^-1 mod R,  R = 2^M  (extended Euclid on N and R)
//   N'peer = Npeer^-1 mod R     (for encrypting with the peer's public key)
// The public key is (N, e), the private key (N, d). N is published on
// pub_valid as soon as it is known, so that a peer board can start its own
// derivation of N'peer; keys_valid rises when everything above is done and
// stays high. ok reports that both inverses existed (gcd == 1).
//
// Timing: it runs once after reset and favours area over speed: one
// multiplier and one modular-inverse unit (M+1 bits wide, so that R fits)
// are reused for all steps. Computing N' dominates, at roughly one
// (M+1)-cycle division per Euclid step. The sequence of operations and the
// value of e follow the reference design; the extra inverse for the peer's modulus
// and the start-up handshake are this design's choice.
module key_derivation #(
  parameter int unsigned M = 512
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [M/2-1:0] p,
  input  logic [M/2-1:0] q,
  input  logic [M-1:0]   peer_n,       // peer's public modulus
  input  logic           peer_valid,   // peer_n is valid
  output logic [M-1:0]   n,
  output logic [M-1:0]   phi,
  output logic [M-1:0]   d,
  output logic [M-1:0]   n_prime,
  output logic [M-1:0]   peer_n_prime,
  output logic           pub_valid,
  output logic           keys_valid,
  output logic           ok
);
  import rsa_pkg::*;

  localparam int unsigned H  = M / 2;
  localparam int unsigned IW = M + 1;

  typedef enum logic [3:0] {
    S_MUL_N, S_WAIT_N, S_MUL_PHI, S_WAIT_PHI,
    S_INV_D, S_WAIT_D, S_INV_NP, S_WAIT_NP,
    S_PEER, S_INV_PP, S_WAIT_PP, S_DONE
  } state_e;
  state_e state;

  logic           mul_in_valid, mul_in_ready, mul_out_valid;
  logic [H-1:0]   mul_a, mul_b;
  logic [M-1:0]   mul_p;
  logic           inv_in_valid, inv_in_ready, inv_out_valid, inv_ok;
  logic [IW-1:0]  inv_a, inv_m, inv_res;

  seq_multiplier #(.W(H)) u_mul (
    .clk, .rst_n,
    .in_valid(mul_in_valid), .in_ready(mul_in_ready),
    .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .out_ready(1'b1),
    .p(mul_p)
  );

  mod_inverse #(.W(IW)) u_inv (
    .clk, .rst_n,
    .in_valid(inv_in_valid), .in_ready(inv_in_ready),
    .a(inv_a), .m(inv_m),
    .out_valid(inv_out_valid), .out_ready(1'b1),
    .inv(inv_res), .ok(inv_ok)
  );

  always_comb begin
    mul_in_valid = (state == S_MUL_N) || (state == S_MUL_PHI);
    mul_a        = (state == S_MUL_N) ? p : p - 1'b1;
    mul_b        = (state == S_MUL_N) ? q : q - 1'b1;
    inv_in_valid = (state == S_INV_D) || (state == S_INV_NP) || (state == S_INV_PP);
    unique case (state)
      S_INV_D:  begin inv_a = IW'(PUBLIC_EXP); inv_m = {1'b0, phi}; end
      S_INV_NP: begin inv_a = {1'b0, n};       inv_m = {1'b1, {M{1'b0}}}; end
      default:  begin inv_a = {1'b0, peer_n};  inv_m = {1'b1, {M{1'b0}}}; end
    endcase
  end

  assign keys_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_MUL_N;
      n <= '0; phi <= '0; d <= '0; n_prime <= '0; peer_n_prime <= '0;
      pub_valid <= 1'b0;
      ok <= 1'b1;
    end else begin
      unique case (state)
        S_MUL_N:    if (mul_in_ready) state <= S_WAIT_N;
        S_WAIT_N:   if (mul_out_valid) begin n <= mul_p; pub_valid <= 1'b1; state <= S_MUL_PHI; end
        S_MUL_PHI:  if (mul_in_ready) state <= S_WAIT_PHI;
        S_WAIT_PHI: if (mul_out_valid) begin phi <= mul_p; state <= S_INV_D; end
        S_INV_D:    if (inv_in_ready) state <= S_WAIT_D;
        S_WAIT_D:   if (inv_out_valid) begin d <= inv_res[M-1:0]; ok <= ok & inv_ok; state <= S_INV_NP; end
        S_INV_NP:   if (inv_in_ready) state <= S_WAIT_NP;
        S_WAIT_NP:  if (inv_out_valid) begin n_prime <= inv_res[M-1:0]; ok <= ok & inv_ok; state <= S_PEER; end
        S_PEER:     if (peer_valid) state <= S_INV_PP;
        S_INV_PP:   if (inv_in_ready) state <= S_WAIT_PP;
        S_WAIT_PP:  if (inv_out_valid) begin peer_n_prime <= inv_res[M-1:0]; ok <= ok & inv_ok; state <= S_DONE; end
        S_DONE:     ;
        default:    state <= S_MUL_N;
      endcase
    end
  end

endmodule
