// bch_corrector: double-error-correcting decoder of the BCH(15,7) code.
//
// Syndromes S1 = c(alpha) and S3 = c(alpha^3) are XOR sums of constant field
// elements selected by the received bits. For up to two errors the error
// locator is sigma(x) = 1 + S1 x + s2 x^2 with s2 = (S3 + S1^3) / S1
// (s2 = 0 for a single error). Every position i is tested in parallel:
// bit i is flipped when S1 != 0 and sigma(alpha^-i) = 0. The output is the
// corrected data part, Correct(D), for any word within distance 2 of a
// codeword. Combinational.
//
// The document names the BCH error corrector and its function only; the
// decoder algorithm is the standard one for t = 2 and is this design's
// choice. The err output (non-zero syndrome) is for observation.
module bch_corrector
  import bch_pkg::*;
(
  input  logic [BCH_N-1:0] c,    // received codeword, c[i] = coefficient of x^i
  output logic [BCH_K-1:0] dc,   // corrected data bits c[14:8]
  output logic             err   // non-zero syndrome
);

  gf_t s1, s3, s2;
  logic [BCH_N-1:0] flip, fixed;

  always_comb begin
    s1 = '0;
    s3 = '0;
    for (int unsigned i = 0; i < BCH_N; i++) begin
      if (c[i]) begin
        s1 ^= gf_alpha(i);
        s3 ^= gf_alpha(3 * i);
      end
    end
    s2 = gf_mul(s3 ^ gf_mul(gf_mul(s1, s1), s1), gf_inv(s1));
    for (int unsigned i = 0; i < BCH_N; i++) begin
      flip[i] = (s1 != '0) &&
                ((4'b0001 ^ gf_mul(s1, gf_alpha(15 - i)) ^ gf_mul(s2, gf_alpha(30 - 2 * i))) == '0);
    end
    fixed = c ^ flip;
  end

  assign dc  = fixed[BCH_N-1:BCH_P];
  assign err = (s1 != '0) || (s3 != '0);

endmodule
