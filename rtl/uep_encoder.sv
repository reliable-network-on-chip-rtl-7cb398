// uep_encoder: systematic encoder of the SEC-DAED-SDAEC code.
//
// The p header bits and d data bits are copied into the codeword unchanged;
// each of the r check bits is the XOR of the message bits whose H column has a
// 1 in that check bit's row, so that the syndrome of the codeword is zero. The
// XOR network is derived at elaboration time from uep_pkg::build_h, so the
// gate count follows the weight of the H rows (sum of row weight - 1 two-input
// XORs). Purely combinational, no clock: the codeword is valid in the same
// cycle as the message.
//   msg : {data, header}, header in msg[P-1:0]
//   cw  : {check, data, header}, check bits in cw[N-1:P+D]
// Systematic encoding by an XOR network is the code's own; the bit order of
// the codeword and the purely combinational form are this design's choices.
// The header and data outputs are wires from the inputs by construction.
module uep_encoder
  import uep_pkg::*;
#(
  parameter int unsigned P = 8,                      // header bits
  parameter int unsigned D = 24,                     // data bits
  parameter int unsigned R = min_check_bits(P, D),   // check bits
  localparam int unsigned K = P + D,
  localparam int unsigned N = K + R
) (
  input  logic [K-1:0] msg,
  output logic [N-1:0] cw
);

  localparam hcode_t HC = build_h(P, D, R);

  if (!HC.ok) begin : g_bad_code
    $fatal(1, "uep_encoder: no SEC-DAED-SDAEC code found for P=%0d D=%0d R=%0d", P, D, R);
  end

  logic [R-1:0] chk;

  always_comb begin
    chk = '0;
    for (int unsigned i = 0; i < K; i++)
      for (int unsigned b = 0; b < R; b++)
        if (HC.h[i][b]) chk[b] = chk[b] ^ msg[i];
  end

  // check bit at codeword position K+j carries syndrome row R-1-j
  always_comb begin
    cw[K-1:0] = msg;
    for (int unsigned j = 0; j < R; j++) cw[K+j] = chk[R-1-j];
  end

endmodule
