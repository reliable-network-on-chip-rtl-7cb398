// tb_uep_syndrome_gen: self-checking test of the syndrome generator.
//
// For the (8,24,6), (16,48,7) and (8,56,7) codes: the all-zero word, every single-bit
// word (the syndrome must be the bit's H column) and random words (the
// syndrome must be the XOR of the columns of the set bits, worked out here).
module tb_uep_syndrome_gen;
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
    localparam int unsigned N = P + D + R;
    localparam hcode_t HC = build_h(P, D, R);

    logic [N-1:0] cw;
    logic [R-1:0] syn;

    uep_syndrome_gen #(.P(P), .D(D), .R(R)) dut (.cw(cw), .syn(syn));

    initial begin
      logic [R-1:0] exp_syn;
      for (int t = 0; t < 3000; t++) begin
        if (t == 0)          cw = '0;
        else if (t <= N)     cw = N'(1) << (t - 1);
        else for (int i = 0; i < N; i += 32) cw[i +: 32] = $urandom;
        #1;
        exp_syn = '0;
        for (int i = 0; i < N; i++) if (cw[i]) exp_syn ^= HC.h[i][R-1:0];
        checks++;
        if (syn !== exp_syn) begin
          failures++;
          $display("FAIL P=%0d: cw %h syndrome %b expected %b", P, cw, syn, exp_syn);
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
