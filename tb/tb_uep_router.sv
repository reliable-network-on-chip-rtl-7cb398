// tb_uep_router: end-to-end test of the ECC-protected store-and-forward router
// at its default size: (8,24,6) code, five ports, 4-packet buffers, router at
// (1,1) of a 4 x 4 mesh.
//
// Five link drivers offer random packets to random destinations; each packet
// is clean or carries a single error, a header double adjacent error, a
// header/data boundary double adjacent error or a data double adjacent error.
// Upsets are also written into the packet waiting at the head of an input
// buffer. Outputs are stalled at random, and the testbench, acting as the next
// routers, refuses some transfers with out_nack. A model keeps, per input, the
// packets the buffer should hold; every packet leaving an output must be the
// clean codeword (built here from H) of the head of some input whose XY route
// is that output, and a refused packet must stay. A link packet with an
// uncorrectable error must be refused with in_nack and is offered again; a
// buffered packet with one must be dropped and followed one cycle later by a
// retransmission request with its header on that input. At the end the router
// is drained and every surviving packet must have left. Each mechanism (the
// five error kinds on the link, three in the buffer, both kinds of
// retransmission request, NACKs received, input back-pressure, output stall,
// two inputs competing for one output, every output used) is counted, and one
// that never happened is a failure.
module tb_uep_router;
  import uep_pkg::*;

  localparam int unsigned P = 8;
  localparam int unsigned D = 24;
  localparam int unsigned R = min_check_bits(P, D);
  localparam int unsigned K = P + D;
  localparam int unsigned N = K + R;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned NP = NUM_PORTS;
  localparam int unsigned AW = P / 4;
  localparam int unsigned NCYC = 20000;
  localparam hcode_t HC = build_h(P, D, R);

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n = 0;
  logic [NP-1:0] in_valid = '0, in_ready, in_nack, out_valid, out_ready = '0, out_nack = '0;
  logic [NP-1:0] retx_valid;
  logic [NP-1:0][N-1:0] in_cw = '0, out_cw;
  logic [NP-1:0][P-1:0] retx_hdr;
  err_events_t [NP-1:0] events;

  uep_router dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_cw(in_cw), .in_ready(in_ready), .in_nack(in_nack),
    .out_valid(out_valid), .out_cw(out_cw), .out_ready(out_ready), .out_nack(out_nack),
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

  function automatic int route(logic [N-1:0] cw);
    int dx, dy;
    dx = int'(cw[AW-1:0]);
    dy = int'(cw[2*AW-1:AW]);
    if (dx != 1) return (dx > 1) ? int'(PORT_EAST) : int'(PORT_WEST);
    if (dy != 1) return (dy > 1) ? int'(PORT_SOUTH) : int'(PORT_NORTH);
    return int'(PORT_LOCAL);
  endfunction

  // error kinds: 0 none, 1 single, 2 header pair, 3 boundary pair, 4 data pair
  function automatic logic [N-1:0] error_mask(int kind);
    case (kind)
      1: return N'(1) << $urandom_range(N - 1);
      2: return N'(3) << $urandom_range(P - 2);
      3: return N'(3) << (P - 1);
      4: return N'(3) << $urandom_range(N - 2, P);
      default: return '0;
    endcase
  endfunction

  function automatic int pick_kind();
    int v;
    v = $urandom_range(99);
    if (v < 40) return 0;
    if (v < 65) return 1;
    if (v < 78) return 2;
    if (v < 86) return 3;
    return 4;
  endfunction

  function automatic logic head_valid_of(int k);
    case (k)
      0: return dut.g_in[0].u_port.head_valid;
      1: return dut.g_in[1].u_port.head_valid;
      2: return dut.g_in[2].u_port.head_valid;
      3: return dut.g_in[3].u_port.head_valid;
      default: return dut.g_in[4].u_port.head_valid;
    endcase
  endfunction

  // upset into the head packet of input buffer k
  task automatic inject(int k, logic [N-1:0] m);
    case (k)
      0: dut.g_in[0].u_port.u_buf.mem[dut.g_in[0].u_port.u_buf.rd_ptr] ^= m;
      1: dut.g_in[1].u_port.u_buf.mem[dut.g_in[1].u_port.u_buf.rd_ptr] ^= m;
      2: dut.g_in[2].u_port.u_buf.mem[dut.g_in[2].u_port.u_buf.rd_ptr] ^= m;
      3: dut.g_in[3].u_port.u_buf.mem[dut.g_in[3].u_port.u_buf.rd_ptr] ^= m;
      default: dut.g_in[4].u_port.u_buf.mem[dut.g_in[4].u_port.u_buf.rd_ptr] ^= m;
    endcase
  endtask

  logic [N-1:0] inbuf [NP][$];     // packets each input buffer should hold
  logic [N-1:0] offer [NP];        // clean form of the packet on each link
  int           offer_kind [NP];
  int           bkind [NP];        // upset present in each buffered head
  logic [NP-1:0] exp_retx = '0;
  logic [NP-1:0][P-1:0] exp_retx_hdr;
  int n_link [5], n_buf [5], n_out [NP];
  int n_stall_in = 0, n_stall_out = 0, n_conflict = 0, n_sent = 0, n_dropped = 0;
  int n_delivered = 0, n_retx = 0;
  bit draining = 0;

  task automatic new_offer(int k);
    logic [K-1:0] m;
    m = K'({$urandom, $urandom, $urandom});
    // destinations within the 4 x 4 corner of the mesh, so every direction is used
    m[AW-1:0] = AW'($urandom_range(3));
    m[2*AW-1:AW] = AW'($urandom_range(3));
    offer[k] = encode(m);
    offer_kind[k] = pick_kind();
    in_cw[k] = offer[k] ^ error_mask(offer_kind[k]);
  endtask

  // the same packet again, after a NACK, with a fresh link error
  task automatic re_offer(int k);
    offer_kind[k] = pick_kind();
    in_cw[k] = offer[k] ^ error_mask(offer_kind[k]);
  endtask

  int n_in_nack = 0, n_out_nack = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  initial begin
    logic [NP-1:0] head_drop, accepted, fire;
    logic [NP-1:0][N-1:0] out_snap;
    int want [NP];
    int found;
    for (int k = 0; k < NP; k++) begin
      new_offer(k);
      bkind[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < int'(NCYC) + 200; t++) begin
      if (t == int'(NCYC)) draining = 1;
      @(negedge clk);
      // retransmission requests from the previous cycle
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (retx_valid[k] !== exp_retx[k] || (exp_retx[k] && retx_hdr[k] !== exp_retx_hdr[k]))
          fail($sformatf("t=%0d port %0d retx %b/%h expected %b/%h", t, k, retx_valid[k],
                         retx_hdr[k], exp_retx[k], exp_retx_hdr[k]));
        if (retx_valid[k]) n_retx++;
      end
      exp_retx = '0;
      // upsets in buffered head packets, at most one per packet
      for (int k = 0; k < NP; k++)
        if (!draining && inbuf[k].size() > 0 && bkind[k] == 0 && $urandom_range(15) == 0) begin
          bkind[k] = 1 + $urandom_range(3);
          if (bkind[k] == 3) bkind[k] = 4;
          inject(k, error_mask(bkind[k]));
          n_buf[bkind[k]]++;
        end
      for (int k = 0; k < NP; k++) begin
        in_valid[k]  = !draining && ($urandom_range(99) < ((t / 2000) % 2 ? 70 : 25));
        out_ready[k] = draining || ($urandom_range(99) < ((t / 3000) % 2 ? 35 : 90));
        out_nack[k]  = !draining && ($urandom_range(99) < 5);
      end
      #1;
      for (int o = 0; o < NP; o++) want[o] = 0;
      for (int k = 0; k < NP; k++) begin
        head_drop[k] = (bkind[k] == 4);
        if (inbuf[k].size() > 0 && !head_drop[k]) want[route(inbuf[k][0])]++;
        checks++;
        if (in_nack[k] !== (in_valid[k] && in_ready[k] && offer_kind[k] == 4))
          fail($sformatf("t=%0d port %0d in_nack %b for error kind %0d", t, k, in_nack[k],
                         offer_kind[k]));
        checks++;
        if (in_ready[k] !== (inbuf[k].size() < DEPTH))
          fail($sformatf("t=%0d port %0d in_ready %b with %0d packets", t, k, in_ready[k],
                         inbuf[k].size()));
        if (head_drop[k]) begin
          checks++;
          if (head_valid_of(k) !== 1'b0 || events[k].buf_ue !== 1'b1)
            fail($sformatf("t=%0d port %0d buffered data pair error not dropped", t, k));
        end
        if (in_valid[k] && !in_ready[k]) n_stall_in++;
      end
      for (int o = 0; o < NP; o++) begin
        if (want[o] > 1) n_conflict++;
        checks++;
        if (out_valid[o] !== (want[o] > 0))
          fail($sformatf("t=%0d output %0d valid %b with %0d waiting", t, o, out_valid[o], want[o]));
        if (out_valid[o] && !out_ready[o]) n_stall_out++;
      end
      accepted = in_valid & in_ready;
      fire = out_valid & out_ready & ~out_nack;
      for (int o = 0; o < NP; o++) if (out_valid[o] && out_ready[o] && out_nack[o]) n_out_nack++;
      out_snap = out_cw;
      @(posedge clk);
      #1;
      // outputs: each packet must be the head of an input routed here
      for (int o = 0; o < NP; o++) begin
        if (fire[o]) begin
          found = -1;
          for (int k = 0; k < NP; k++)
            if (found < 0 && !head_drop[k] && inbuf[k].size() > 0 && inbuf[k][0] == out_snap[o]
                && route(inbuf[k][0]) == o)
              found = k;
          checks++;
          if (found < 0) fail($sformatf("t=%0d output %0d sent unexpected %h", t, o, out_snap[o]));
          else begin
            void'(inbuf[found].pop_front());
            bkind[found] = 0;
            n_out[o]++;
            n_delivered++;
          end
        end
      end
      for (int k = 0; k < NP; k++) begin
        if (head_drop[k]) begin
          exp_retx[k] = 1'b1;
          exp_retx_hdr[k] = inbuf[k][0][P-1:0];
          void'(inbuf[k].pop_front());
          bkind[k] = 0;
          n_dropped++;
        end
        if (accepted[k]) begin
          n_link[offer_kind[k]]++;
          if (offer_kind[k] == 4) begin
            n_in_nack++;
            re_offer(k);
          end else begin
            inbuf[k].push_back(offer[k]);
            n_sent++;
            new_offer(k);
          end
        end
      end
    end
    // drained?
    for (int k = 0; k < NP; k++) begin
      checks++;
      if (inbuf[k].size() != 0) fail($sformatf("input %0d still holds %0d packets", k, inbuf[k].size()));
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_link[k] == 0) fail($sformatf("link error kind %0d never happened", k));
    end
    for (int k = 1; k < 5; k++) begin
      if (k == 3) continue;
      checks++;
      if (n_buf[k] == 0) fail($sformatf("buffer error kind %0d never happened", k));
    end
    for (int o = 0; o < NP; o++) begin
      checks++;
      if (n_out[o] == 0) fail($sformatf("output %0d never used", o));
    end
    checks++;
    if (n_stall_in == 0 || n_stall_out == 0 || n_conflict == 0 || n_retx == 0
        || n_in_nack == 0 || n_out_nack == 0)
      fail("a flow-control mechanism never happened");
    $display("link errors: none %0d single %0d header-pair %0d boundary-pair %0d data-pair %0d",
             n_link[0], n_link[1], n_link[2], n_link[3], n_link[4]);
    $display("buffer upsets: single %0d header-pair %0d data-pair %0d",
             n_buf[1], n_buf[2], n_buf[4]);
    $display("delivered %0d, dropped from buffers %0d, end-to-end requests %0d", n_delivered,
             n_dropped, n_retx);
    $display("link NACKs sent %0d, NACKs received on outputs %0d", n_in_nack, n_out_nack);
    $display("input back-pressure %0d, output stalls %0d, output conflicts %0d",
             n_stall_in, n_stall_out, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
