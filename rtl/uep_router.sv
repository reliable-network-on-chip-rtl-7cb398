// uep_router: store-and-forward NoC router protected by the SEC-DAED-SDAEC
// unequal-error-protection code.
//
// Every packet is a single codeword of N = P + D + R bits (header, data, check
// bits) and crosses a link in one transfer. Five input ports (LOCAL, NORTH,
// EAST, SOUTH, WEST; see uep_pkg::port_e) each decode, correct and re-encode an
// arriving packet, store it whole, decode it again to route it, and hand a
// freshly encoded copy to the crossbar. Each output has a round-robin arbiter
// over the five input heads that want it. Single-bit errors anywhere and double
// adjacent errors in the header are corrected on the fly. Other double adjacent
// errors are answered with a retransmission request: one picked up on a link is
// refused with a NACK and the upstream router, which still holds a clean copy,
// sends the packet again (outputs obey the same rule towards the next router);
// one that hit a packet in the buffer makes the input drop it and raise an
// end-to-end request that carries the header (its source field names the
// sender).
// Interface (all arrays indexed by port_e):
//   in_valid/in_ready/in_cw   : input links, transfer when both are high and
//                               in_nack is low
//   in_nack                   : link retransmission request (combinational):
//                               the offered packet is uncorrectable, resend it
//   out_valid/out_ready/out_cw: output links, same rule; out_cw and out_valid
//                               are combinational from the buffer heads
//   out_nack                  : downstream refuses the packet; it stays at the
//                               head of its buffer and is offered again
//   retx_valid/retx_hdr       : end-to-end retransmission requests for packets
//                               dropped from a buffer, one per input
//   events                    : per-input error events of the cycle
// Timing: a packet accepted in cycle t can leave in cycle t+1 at the earliest.
// Header format (this design's choice): header[P/2-1:0] = destination {y, x},
// header[P-1:P/2] = source {y, x}, P/4 bits per coordinate, so the default
// 8-bit header addresses a 4 x 4 mesh. The router sits at (X, Y).
// The ECC placement and the code follow the document's router ECC scheme; the
// port count, routing, arbitration, buffer depth and handshakes are this
// design's choices.
module uep_router
  import uep_pkg::*;
#(
  parameter int unsigned P     = 8,
  parameter int unsigned D     = 24,
  parameter int unsigned R     = min_check_bits(P, D),
  parameter int unsigned DEPTH = 4,
  parameter int unsigned X     = 1,
  parameter int unsigned Y     = 1,
  localparam int unsigned N    = P + D + R,
  localparam int unsigned NP   = NUM_PORTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NP-1:0]         in_valid,
  input  logic [NP-1:0][N-1:0]  in_cw,
  output logic [NP-1:0]         in_ready,
  output logic [NP-1:0]         in_nack,
  output logic [NP-1:0]         out_valid,
  output logic [NP-1:0][N-1:0]  out_cw,
  input  logic [NP-1:0]         out_ready,
  input  logic [NP-1:0]         out_nack,
  output logic [NP-1:0]         retx_valid,
  output logic [NP-1:0][P-1:0]  retx_hdr,
  output err_events_t [NP-1:0]  events
);

  logic  [NP-1:0]        head_valid, head_pop;
  port_e                 head_port [NP];
  logic  [NP-1:0][N-1:0] head_cw;
  logic  [NP-1:0][NP-1:0] req, grant;   // [output][input]

  for (genvar i = 0; i < NP; i++) begin : g_in
    uep_input_port #(.P(P), .D(D), .R(R), .DEPTH(DEPTH), .X(X), .Y(Y)) u_port (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[i]),
      .in_cw      (in_cw[i]),
      .in_ready   (in_ready[i]),
      .in_nack    (in_nack[i]),
      .head_valid (head_valid[i]),
      .head_port  (head_port[i]),
      .head_cw    (head_cw[i]),
      .head_pop   (head_pop[i]),
      .retx_valid (retx_valid[i]),
      .retx_hdr   (retx_hdr[i]),
      .events     (events[i])
    );
  end

  always_comb begin
    for (int unsigned o = 0; o < NP; o++)
      for (int unsigned i = 0; i < NP; i++)
        req[o][i] = head_valid[i] && (head_port[i] == port_e'(o));
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    uep_rr_arbiter #(.NREQ(NP)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[o]),
      .advance (out_ready[o] && !out_nack[o]),
      .grant   (grant[o])
    );
  end

  // crossbar
  always_comb begin
    out_valid = '0;
    out_cw    = '0;
    head_pop  = '0;
    for (int unsigned o = 0; o < NP; o++) begin
      for (int unsigned i = 0; i < NP; i++) begin
        if (grant[o][i]) begin
          out_valid[o] = 1'b1;
          out_cw[o]    = head_cw[i];
          head_pop[i]  = out_ready[o] && !out_nack[o];
        end
      end
    end
  end

endmodule
