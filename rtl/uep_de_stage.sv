// uep_de_stage: the decode-and-encode ("D + E") stage at a router input.
//
// A packet arriving over a link is decoded and corrected, and its message is
// encoded again before it is written into the router buffer, so an error picked
// up on the link is removed before the buffer adds its own exposure to upsets.
// The status outputs of the decoder are passed on so that the input port can
// request a retransmission when the packet cannot be corrected. Combinational.
module uep_de_stage
  import uep_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned D = 24,
  parameter int unsigned R = min_check_bits(P, D),
  localparam int unsigned K = P + D,
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] cw_in,
  output logic [N-1:0] cw_out,
  output logic [P-1:0] header,
  output logic         err,
  output logic         corr_one,
  output logic         corr_two,
  output logic         ue
);

  logic [K-1:0] msg;
  logic [N-1:0] cw_fix;
  logic [R-1:0] syn;

  uep_decoder #(.P(P), .D(D), .R(R)) u_dec (
    .cw       (cw_in),
    .cw_fix   (cw_fix),
    .msg      (msg),
    .syn      (syn),
    .err      (err),
    .corr_one (corr_one),
    .corr_two (corr_two),
    .ue       (ue)
  );

  uep_encoder #(.P(P), .D(D), .R(R)) u_enc (
    .msg (msg),
    .cw  (cw_out)
  );

  assign header = msg[P-1:0];

endmodule
