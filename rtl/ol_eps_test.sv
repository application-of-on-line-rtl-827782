// ol_eps_test: the epsilon test of the 2x2 SVD, |nu| <= eps * |mu|, with
// eps = 2^-EPS_K.  It runs on the exponents alone, concurrently with the
// division mu/nu.  For quasi-normalized mantissas (|m| in [1/4,1)) the
// ratio |nu|/|mu| is below 2^(e_nu - e_mu + 2), so the test passes when
//     e_nu - e_mu + 2 <= -EPS_K     or nu is the zero operand,
// which never passes a pair that fails the exact test.  mu and nu arrive in
// lock-step; the decision is taken on the first digit and held in `hit`
// until the next pair, `hit_v` pulses with it.  M digits make one operand.
// The document performs the test on the exponents of mu and nu; the bound,
// EPS_K and the holding of the result are this design's choices.
module ol_eps_test
  import ol_pkg::*;
#(
  parameter int unsigned M     = OL_M,
  parameter int unsigned EPS_K = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  mu,
  input  ol_t  nu,
  output logic hit,
  output logic hit_v
);

  logic [$clog2(M)-1:0] idx;
  logic pass;

  always_comb begin
    pass  = (nu.e == ZERO_EXP) ||
            ((int'(nu.e) - int'(mu.e) + 2) <= -int'(EPS_K) && mu.e != ZERO_EXP);
    hit_v = mu.v && (idx == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      hit <= 1'b0;
    end else if (mu.v) begin
      idx <= (idx == ($clog2(M))'(M - 1)) ? '0 : idx + 1'b1;
      if (idx == '0) hit <= pass;
    end
  end

endmodule
