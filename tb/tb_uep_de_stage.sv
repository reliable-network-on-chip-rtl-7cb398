// tb_uep_de_stage: self-checking test of the link decode-and-encode stage.
//
// Random (8,24,6) codewords, built here from H, arrive with no error, a
// random single error, a header or boundary double adjacent error, or a
// double adjacent error in the data or check bits. The stage must put out the
// clean codeword and header in the first three cases and raise ue in the last.
module tb_uep_de_stage;
  import uep_pkg::*;

  localparam int unsigned P = 8;
  localparam int unsigned D = 24;
  localparam int unsigned R = min_check_bits(P, D);
  localparam int unsigned K = P + D;
  localparam int unsigned N = K + R;
  localparam hcode_t HC = build_h(P, D, R);

  int checks = 0;
  int failures = 0;

  logic [N-1:0] cw_in, cw_out;
  logic [P-1:0] header;
  logic err, corr_one, corr_two, ue;

  uep_de_stage #(.P(P), .D(D), .R(R)) dut (
    .cw_in(cw_in), .cw_out(cw_out), .header(header),
    .err(err), .corr_one(corr_one), .corr_two(corr_two), .ue(ue));

  function automatic logic [N-1:0] encode(logic [K-1:0] m);
    logic [R-1:0] c;
    logic [N-1:0] w;
    c = '0;
    for (int i = 0; i < K; i++) if (m[i]) c ^= HC.h[i][R-1:0];
    w[K-1:0] = m;
    for (int j = 0; j < R; j++) w[K+j] = c[R-1-j];
    return w;
  endfunction

  initial begin
    logic [K-1:0] m;
    logic [N-1:0] good;
    int kind, pos;
    for (int t = 0; t < 4000; t++) begin
      m = K'({$urandom, $urandom});
      good = encode(m);
      kind = t % 4;
      case (kind)
        0: cw_in = good;
        1: begin pos = $urandom_range(N - 1); cw_in = good ^ (N'(1) << pos); end
        2: begin pos = $urandom_range(P - 1); cw_in = good ^ (N'(3) << pos); end
        default: begin pos = $urandom_range(N - 2, P); cw_in = good ^ (N'(3) << pos); end
      endcase
      #1;
      checks++;
      if (kind < 3) begin
        if (cw_out !== good || header !== m[P-1:0] || ue !== 1'b0
            || err !== (kind != 0) || corr_one !== (kind == 1) || corr_two !== (kind == 2)) begin
          failures++;
          $display("FAIL kind %0d: out %h expected %h", kind, cw_out, good);
        end
      end else if (ue !== 1'b1) begin
        failures++;
        $display("FAIL data pair at %0d not flagged", pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
