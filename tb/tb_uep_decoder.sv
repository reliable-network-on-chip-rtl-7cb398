// tb_uep_decoder: self-checking test of the complete decoder.
//
// For the (8,24,6), (16,48,7) and (8,56,7) codes, random messages are encoded here (check
// bits worked out from H) and hit with every error the code is built for:
// none, every single-bit error, every double adjacent error. Expected:
//   no error                       -> message unchanged, err = 0
//   single error anywhere          -> corrected, corr_one
//   double adjacent, <i,i+1>, i<p  -> corrected, corr_two (header and boundary)
//   double adjacent elsewhere      -> ue = 1 (detected, not corrected)
module tb_uep_decoder;
  import uep_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [2:0] done = '0;

  localparam int CP [3] = '{8, 16, 8};
  localparam int CD [3] = '{24, 48, 56};

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int unsigned P = CP[g];
    localparam int unsigned D = CD[g];
    localparam int unsigned R = min_check_bits(P, D);
    localparam int unsigned K = P + D;
    localparam int unsigned N = K + R;
    localparam hcode_t HC = build_h(P, D, R);

    logic [N-1:0] cw, cw_fix;
    logic [K-1:0] msg;
    logic [R-1:0] syn;
    logic err, corr_one, corr_two, ue;

    uep_decoder #(.P(P), .D(D), .R(R)) dut (
      .cw(cw), .cw_fix(cw_fix), .msg(msg), .syn(syn),
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

    task automatic expect_ok(logic [N-1:0] good, logic e1, logic e2, string what);
      checks++;
      if (cw_fix !== good || msg !== good[K-1:0] || ue !== 1'b0 || corr_one !== e1
          || corr_two !== e2 || err !== (e1 | e2)) begin
        failures++;
        $display("FAIL P=%0d %s: got %h exp %h flags %b%b%b%b", P, what, cw_fix, good,
                 err, corr_one, corr_two, ue);
      end
    endtask

    initial begin
      logic [K-1:0] m;
      logic [N-1:0] good;
      for (int t = 0; t < 40; t++) begin
        for (int i = 0; i < K; i += 32) m[i +: 32] = $urandom;
        if (t == 0) m = '0;
        good = encode(m);
        cw = good;
        #1 expect_ok(good, 1'b0, 1'b0, "clean");
        for (int i = 0; i < N; i++) begin
          cw = good ^ (N'(1) << i);
          #1 expect_ok(good, 1'b1, 1'b0, $sformatf("single %0d", i));
        end
        for (int i = 0; i + 1 < N; i++) begin
          cw = good ^ (N'(3) << i);
          #1;
          if (i < int'(P)) expect_ok(good, 1'b0, 1'b1, $sformatf("pair %0d", i));
          else begin
            checks++;
            if (ue !== 1'b1 || err !== 1'b1) begin
              failures++;
              $display("FAIL P=%0d pair %0d not flagged uncorrectable", P, i);
            end
          end
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
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
