// tb_uep_input_port: self-checking test of one router input port, (8,24,6)
// code, router at (1,1).
//
// A driver offers random packets on the link, a quarter clean and the rest with
// a single error, a header/boundary double adjacent error or a data double
// adjacent error. Upsets are also injected into the packet waiting at the head
// of the buffer (single, header pair, data pair). A consumer pops the head at
// random. Checked against a queue model:
//   - the head shows the oldest surviving packet, as a clean codeword built
//     here from H, with the output port worked out here by XY routing;
//   - a packet with an uncorrectable link error is refused with in_nack and
//     offered again (with a fresh random error) until it gets through;
//   - a buffered packet with an uncorrectable error is dropped and exactly one
//     retransmission request carrying its header follows one cycle later;
//   - in_ready falls when the buffer is full (back-pressure).
// Counts how often each mechanism happened and fails if one never did.
module tb_uep_input_port;
  import uep_pkg::*;

  localparam int unsigned P = 8;
  localparam int unsigned D = 24;
  localparam int unsigned R = min_check_bits(P, D);
  localparam int unsigned K = P + D;
  localparam int unsigned N = K + R;
  localparam int unsigned DEPTH = 4;
  localparam hcode_t HC = build_h(P, D, R);

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n = 0;
  logic in_valid = 0;
  logic [N-1:0] in_cw = '0;
  logic in_ready, in_nack;
  logic head_valid;
  port_e head_port;
  logic [N-1:0] head_cw;
  logic head_pop = 0;
  logic retx_valid;
  logic [P-1:0] retx_hdr;
  err_events_t events;

  uep_input_port #(.P(P), .D(D), .R(R), .DEPTH(DEPTH), .X(1), .Y(1)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_cw(in_cw), .in_ready(in_ready), .in_nack(in_nack),
    .head_valid(head_valid), .head_port(head_port), .head_cw(head_cw), .head_pop(head_pop),
    .retx_valid(retx_valid), .retx_hdr(retx_hdr), .events(events));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] encode(logic [K-1:0] m);
    logic [R-1:0] c;
    logic [N-1:0] w;
    c = '0;
    for (int i = 0; i < K; i++) if (m[i]) c ^= HC.h[i][R-1:0];
    w[K-1:0] = m;
    for (int j = 0; j < R; j++) w[K+j] = c[R-1-j];
    return w;
  endfunction

  function automatic port_e route(logic [P-1:0] hdr);
    int dx, dy;
    dx = int'(hdr[1:0]);
    dy = int'(hdr[3:2]);
    if (dx != 1) return (dx > 1) ? PORT_EAST : PORT_WEST;
    if (dy != 1) return (dy > 1) ? PORT_SOUTH : PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  function automatic logic [N-1:0] error_mask(int kind);
    case (kind)
      1: return N'(1) << $urandom_range(N - 1);
      2: return N'(3) << $urandom_range(P - 1);
      3: return N'(3) << $urandom_range(N - 2, P);
      default: return '0;
    endcase
  endfunction

  logic [N-1:0] model [$];
  logic [N-1:0] offer;          // clean form of the packet on the link
  int           offer_kind;
  logic         exp_retx = 0;
  logic [P-1:0] exp_retx_hdr;
  int n_link_kind [4];
  int n_buf_kind [4];
  int n_stall = 0, n_delivered = 0;
  int ports_seen [5];

  task automatic new_offer();
    logic [K-1:0] m;
    m = K'({$urandom, $urandom});
    offer = encode(m);
    offer_kind = $urandom_range(3);
    in_cw = offer ^ error_mask(offer_kind);
  endtask

  // the same packet again, after a NACK, with a fresh link error
  task automatic re_offer();
    offer_kind = $urandom_range(3);
    in_cw = offer ^ error_mask(offer_kind);
  endtask

  int n_nack = 0;

  initial begin
    int bkind;         // upset present in the buffered head packet
    logic head_drop, accepted;
    repeat (2) @(posedge clk);
    rst_n = 1;
    new_offer();
    bkind = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // retransmission request of the previous cycle
      checks++;
      if (retx_valid !== exp_retx || (exp_retx && retx_hdr !== exp_retx_hdr)) begin
        failures++;
        $display("FAIL t=%0d retx %b/%h expected %b/%h", t, retx_valid, retx_hdr,
                 exp_retx, exp_retx_hdr);
      end
      exp_retx = 0;
      // upset in the buffered head packet, at most one per packet
      if (model.size() > 0 && bkind == 0 && $urandom_range(9) == 0) begin
        bkind = 1 + $urandom_range(2);
        dut.u_buf.mem[dut.u_buf.rd_ptr] = dut.u_buf.mem[dut.u_buf.rd_ptr] ^ error_mask(bkind);
        n_buf_kind[bkind]++;
      end
      in_valid = ($urandom_range(99) < ((t / 1000) % 2 ? 90 : 40));
      head_pop = 0;
      #1;
      head_drop = (bkind == 3);
      // head checks
      checks++;
      if (model.size() == 0) begin
        if (head_valid !== 1'b0) begin
          failures++;
          $display("FAIL t=%0d head_valid with empty model", t);
        end
      end else if (head_drop) begin
        if (head_valid !== 1'b0 || events.buf_ue !== 1'b1) begin
          failures++;
          $display("FAIL t=%0d buffered data pair error not dropped", t);
        end
      end else if (head_valid !== 1'b1 || head_cw !== model[0]
                   || head_port !== route(model[0][P-1:0])
                   || events.buf_corr_one !== (bkind == 1)
                   || events.buf_corr_two !== (bkind == 2)) begin
        failures++;
        $display("FAIL t=%0d head %b %h port %0d expected %h port %0d", t, head_valid, head_cw,
                 head_port, model[0], route(model[0][P-1:0]));
      end
      checks++;
      if (in_nack !== (in_valid && in_ready && offer_kind == 3)) begin
        failures++;
        $display("FAIL t=%0d in_nack %b for error kind %0d", t, in_nack, offer_kind);
      end
      checks++;
      if (in_ready !== (model.size() < DEPTH)) begin
        failures++;
        $display("FAIL t=%0d in_ready %b with %0d packets", t, in_ready, model.size());
      end
      if (in_valid && !in_ready) n_stall++;
      if (!head_drop && head_valid && $urandom_range(99) < ((t / 1000) % 2 ? 30 : 80)) head_pop = 1;
      accepted = in_valid && in_ready;
      @(posedge clk);
      #1;
      // model update
      if (head_drop) begin
        exp_retx = 1;
        exp_retx_hdr = model[0][P-1:0];
        void'(model.pop_front());
        bkind = 0;
      end else if (head_pop) begin
        void'(model.pop_front());
        n_delivered++;
        bkind = 0;
      end
      if (accepted) begin
        n_link_kind[offer_kind]++;
        if (offer_kind == 3) begin
          n_nack++;
          re_offer();
        end else begin
          model.push_back(offer);
          ports_seen[route(offer[P-1:0])]++;
          new_offer();
        end
      end
      in_valid = 0;
      head_pop = 0;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_link_kind[k] == 0) begin
        failures++;
        $display("FAIL: link error kind %0d never happened", k);
      end
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (n_buf_kind[k] == 0) begin
        failures++;
        $display("FAIL: buffer error kind %0d never happened", k);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (ports_seen[k] == 0) begin
        failures++;
        $display("FAIL: route to port %0d never happened", k);
      end
    end
    checks++;
    if (n_stall == 0 || n_delivered == 0) begin
      failures++;
      $display("FAIL: stall %0d delivered %0d", n_stall, n_delivered);
    end
    $display("link: clean %0d single %0d header-pair %0d data-pair %0d", n_link_kind[0],
             n_link_kind[1], n_link_kind[2], n_link_kind[3]);
    $display("link NACKs %0d", n_nack);
    $display("buffer: single %0d header-pair %0d data-pair %0d; stalls %0d delivered %0d",
             n_buf_kind[1], n_buf_kind[2], n_buf_kind[3], n_stall, n_delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
