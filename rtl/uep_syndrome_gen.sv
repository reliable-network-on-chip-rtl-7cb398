// uep_syndrome_gen: syndrome generator of the SEC-DAED-SDAEC decoder.
//
// Syndrome bit b is the XOR of every codeword bit whose H column has a 1 in
// row b; a zero syndrome means no error was seen, otherwise the syndrome names
// the error pattern (a column of H for a single error, the XOR of two adjacent
// columns for a double adjacent error). The XOR trees follow the H matrix
// built by uep_pkg::build_h. Combinational.
// The structure is the code's own; the matrix it follows is this design's
// (see uep_pkg).
module uep_syndrome_gen
  import uep_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned D = 24,
  parameter int unsigned R = min_check_bits(P, D),
  localparam int unsigned N = P + D + R
) (
  input  logic [N-1:0] cw,
  output logic [R-1:0] syn
);

  localparam hcode_t HC = build_h(P, D, R);

  if (!HC.ok) begin : g_bad_code
    $fatal(1, "uep_syndrome_gen: no SEC-DAED-SDAEC code found for P=%0d D=%0d R=%0d", P, D, R);
  end

  always_comb begin
    syn = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned b = 0; b < R; b++)
        if (HC.h[i][b]) syn[b] = syn[b] ^ cw[i];
  end

endmodule
