// tb_uep_encoder: self-checking test of the systematic encoder.
//
// For the (8,24,6), (16,48,7) and (8,56,7) codes, random and corner messages are encoded.
// Checked: header and data are copied unchanged, and the syndrome of the
// codeword, computed here bit by bit from the columns of H, is zero; the check
// bits are also compared with the unique solution worked out here (check bit j
// is the XOR of the message bits whose column has row r-1-j set).
module tb_uep_encoder;
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

    logic [K-1:0] msg;
    logic [N-1:0] cw;

    uep_encoder #(.P(P), .D(D), .R(R)) dut (.msg(msg), .cw(cw));

    initial begin
      logic [R-1:0] syn, exp_chk;
      for (int t = 0; t < 2000; t++) begin
        if (t == 0)      msg = '0;
        else if (t == 1) msg = '1;
        else if (t < K + 2) msg = K'(1) << (t - 2);
        else for (int i = 0; i < K; i += 32) msg[i +: 32] = $urandom;
        #1;
        syn = '0;
        exp_chk = '0;
        for (int i = 0; i < N; i++) if (cw[i]) syn ^= HC.h[i][R-1:0];
        for (int i = 0; i < K; i++) if (msg[i]) exp_chk ^= HC.h[i][R-1:0];
        checks++;
        if (cw[K-1:0] !== msg) begin
          failures++;
          $display("FAIL P=%0d: message not copied", P);
        end
        checks++;
        if (syn != '0) begin
          failures++;
          $display("FAIL P=%0d: syndrome %b of codeword %h", P, syn, cw);
        end
        for (int j = 0; j < R; j++) begin
          checks++;
          if (cw[K+j] !== exp_chk[R-1-j]) begin
            failures++;
            $display("FAIL P=%0d: check bit %0d", P, j);
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
