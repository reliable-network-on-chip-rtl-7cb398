// uep_decoder: error detection and correction for the SEC-DAED-SDAEC code.
//
// Syndrome generator -> syndrome decoder -> N two-input XORs that flip the
// located bits. It corrects every single-bit error, every double adjacent error
// in the header and on the header/data boundary, and flags every other double
// adjacent error as uncorrectable (ue). When ue is set the header bits are still
// trustworthy for the error model of the code (single or adjacent double
// upsets), so a router can read the source address and request a
// retransmission. Combinational; the corrected message is available in the same
// cycle as the codeword.
//   cw        : received codeword {check, data, header}
//   cw_fix    : corrected codeword
//   msg       : corrected {data, header}
//   syn       : syndrome
//   err       : an error was detected (syndrome non-zero)
//   corr_one  : single error corrected
//   corr_two  : header double adjacent error corrected
//   ue        : uncorrectable error
// The block structure follows the code's decoder; having no register inside
// is this design's choice.
module uep_decoder
  import uep_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned D = 24,
  parameter int unsigned R = min_check_bits(P, D),
  localparam int unsigned K = P + D,
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] cw,
  output logic [N-1:0] cw_fix,
  output logic [K-1:0] msg,
  output logic [R-1:0] syn,
  output logic         err,
  output logic         corr_one,
  output logic         corr_two,
  output logic         ue
);

  logic [N-1:0] evec;

  uep_syndrome_gen #(.P(P), .D(D), .R(R)) u_syn (
    .cw  (cw),
    .syn (syn)
  );

  uep_syndrome_decoder #(.P(P), .D(D), .R(R)) u_sdec (
    .syn      (syn),
    .evec     (evec),
    .err      (err),
    .corr_one (corr_one),
    .corr_two (corr_two),
    .ue       (ue)
  );

  assign cw_fix = cw ^ evec;
  assign msg    = cw_fix[K-1:0];

endmodule
