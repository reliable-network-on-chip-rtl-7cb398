// uep_input_port: one input of the ECC-protected store-and-forward router.
//
// Path of a packet (one codeword per link transfer):
//   link -> D+E stage (decode, correct, re-encode) -> packet buffer ->
//   head decoder (correct, read the destination for routing) -> re-encoder ->
//   crossbar.
// The link stage removes errors picked up on the link; the head decoder removes
// upsets that hit the packet while it sat in the buffer, and gives the routing
// logic a corrected destination address. Uncorrectable errors are answered
// with a retransmission request in one of two ways:
//   - on the link, the transfer is refused with in_nack: the sender still
//     holds a clean copy and sends it again (hop-by-hop);
//   - in the buffer, the only copy is damaged: the packet is dropped and
//     retx_valid/retx_hdr carry its (correct) header, whose source field tells
//     the system whom to ask (end-to-end).
// The decode/encode placement follows the router ECC organisation; the two
// request paths, the buffer depth and the handshake are this design's choices.
//
// Interface and timing:
//   in_valid/in_ready/in_cw : link input, a packet moves when both are high
//     and in_nack is low. in_ready depends on buffer state only: it is low
//     when the buffer is full.
//   in_nack : combinational, high when the offered packet is uncorrectable
//     (only while in_valid and in_ready); the packet is not taken and the
//     sender must keep it and offer it again.
//   head_valid, head_port, head_cw : the oldest buffered packet, corrected and
//     re-encoded, and the output it wants; head_pop removes it (same cycle).
//   retx_valid/retx_hdr : registered, one cycle after a buffered packet is
//     dropped; no back-pressure.
//   events : error events of this cycle, for monitoring.
// A packet written in cycle t is visible at the head in cycle t+1.
module uep_input_port
  import uep_pkg::*;
#(
  parameter int unsigned P     = 8,
  parameter int unsigned D     = 24,
  parameter int unsigned R     = min_check_bits(P, D),
  parameter int unsigned DEPTH = 4,
  parameter int unsigned X     = 1,
  parameter int unsigned Y     = 1,
  localparam int unsigned N    = P + D + R
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_cw,
  output logic         in_ready,
  output logic         in_nack,
  output logic         head_valid,
  output port_e        head_port,
  output logic [N-1:0] head_cw,
  input  logic         head_pop,
  output logic         retx_valid,
  output logic [P-1:0] retx_hdr,
  output err_events_t  events
);

  // --- link side: D + E
  logic [N-1:0] link_cw;
  logic [P-1:0] link_hdr;
  logic         link_err, link_one, link_two, link_ue;

  uep_de_stage #(.P(P), .D(D), .R(R)) u_de (
    .cw_in    (in_cw),
    .cw_out   (link_cw),
    .header   (link_hdr),
    .err      (link_err),
    .corr_one (link_one),
    .corr_two (link_two),
    .ue       (link_ue)
  );

  // --- buffer
  logic         push, pop, empty, full;
  logic [N-1:0] buf_head;

  uep_packet_buffer #(.W(N), .DEPTH(DEPTH)) u_buf (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .din   (link_cw),
    .pop   (pop),
    .head  (buf_head),
    .empty (empty),
    .full  (full)
  );

  // --- head: decode for routing, then encode again for the link
  logic [P+D-1:0] head_msg;
  logic [N-1:0]   head_fix;
  logic [R-1:0]   head_syn;
  logic           head_err, head_one, head_two, head_ue;

  uep_decoder #(.P(P), .D(D), .R(R)) u_head_dec (
    .cw       (buf_head),
    .cw_fix   (head_fix),
    .msg      (head_msg),
    .syn      (head_syn),
    .err      (head_err),
    .corr_one (head_one),
    .corr_two (head_two),
    .ue       (head_ue)
  );

  uep_encoder #(.P(P), .D(D), .R(R)) u_head_enc (
    .msg (head_msg),
    .cw  (head_cw)
  );

  // destination = low half of the header, source = high half
  uep_xy_route #(.AW(P / 4), .X(X), .Y(Y)) u_route (
    .dst  (head_msg[P/2-1:0]),
    .port (head_port)
  );

  logic drop_head, link_fire;

  assign drop_head  = !empty && head_ue;
  assign head_valid = !empty && !head_ue;
  assign pop        = drop_head || (head_valid && head_pop);
  assign in_ready   = !full;
  assign link_fire  = in_valid && in_ready;
  assign in_nack    = link_fire && link_ue;
  assign push       = link_fire && !link_ue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      retx_valid <= 1'b0;
      retx_hdr   <= '0;
    end else begin
      retx_valid <= drop_head;
      if (drop_head) retx_hdr <= head_msg[P-1:0];
    end
  end

  always_comb begin
    events              = '0;
    events.in_corr_one  = link_fire && link_one;
    events.in_corr_two  = link_fire && link_two;
    events.in_ue        = in_nack;
    events.buf_corr_one = !empty && head_one;
    events.buf_corr_two = !empty && head_two;
    events.buf_ue       = drop_head;
  end

  a_pop_valid : assert property (@(posedge clk) disable iff (!rst_n) head_pop |-> head_valid);

endmodule
