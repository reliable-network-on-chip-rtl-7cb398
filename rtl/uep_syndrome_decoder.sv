// uep_syndrome_decoder: maps a syndrome to the bits to flip.
//
// For every codeword bit i an r-input AND (an equality compare) tests whether
// the syndrome equals column i of H, a single error at bit i. For the header,
// P more compares test the syndromes of the double adjacent errors
// <i, i+1>, i = 0 .. P-1 (the P-1 pairs inside the header and the pair that
// straddles the header/data boundary). Error-vector bit i is the OR of its
// single-error match and the two pair matches that cover it (a 3-input OR in the
// header, the single match alone elsewhere). The code guarantees that at most
// one of all these matches is true. A non-zero syndrome that matches nothing is
// an uncorrectable error (ue); this includes every double adjacent error inside
// the data and check bits. Combinational.
//   err       : syndrome non-zero (an error was seen)
//   corr_one  : a single-bit error was located
//   corr_two  : a header double adjacent error was located
//   ue        : uncorrectable error
// The AND/OR structure and the set of corrected pairs follow the code's
// decoding rules; the separate corr_one/corr_two flags are this design's
// addition for monitoring.
module uep_syndrome_decoder
  import uep_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned D = 24,
  parameter int unsigned R = min_check_bits(P, D),
  localparam int unsigned N = P + D + R
) (
  input  logic [R-1:0] syn,
  output logic [N-1:0] evec,
  output logic         err,
  output logic         corr_one,
  output logic         corr_two,
  output logic         ue
);

  localparam hcode_t HC = build_h(P, D, R);

  if (!HC.ok) begin : g_bad_code
    $fatal(1, "uep_syndrome_decoder: no SEC-DAED-SDAEC code found for P=%0d D=%0d R=%0d", P, D, R);
  end

  logic [N-1:0] single_hit;   // syndrome == column i
  logic [P-1:0] pair_hit;     // syndrome == column i ^ column i+1

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      single_hit[i] = (syn == HC.h[i][R-1:0]);
    for (int unsigned i = 0; i < P; i++)
      pair_hit[i] = (syn == (HC.h[i][R-1:0] ^ HC.h[i+1][R-1:0]));
  end

  always_comb begin
    evec = single_hit;
    for (int unsigned i = 0; i < P; i++) begin
      evec[i]   = evec[i]   | pair_hit[i];
      evec[i+1] = evec[i+1] | pair_hit[i];
    end
  end

  assign err      = |syn;
  assign corr_one = |single_hit;
  assign corr_two = |pair_hit;
  assign ue       = err & ~corr_one & ~corr_two;

endmodule
