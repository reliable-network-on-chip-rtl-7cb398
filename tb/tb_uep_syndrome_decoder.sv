// tb_uep_syndrome_decoder: exhaustive test of the syndrome decoder.
//
// For the (8,24,6), (16,48,7) and (8,56,7) codes every one of the 2^r syndromes is
// applied. The expected error vector is found here by searching H: a column
// match flips that bit, a match with the XOR of header columns i and i+1
// (i < p) flips both, anything else non-zero is uncorrectable. The flags err,
// corr_one, corr_two and ue are checked too, and that the (p-1) header pairs
// plus the boundary pair are each decoded.
module tb_uep_syndrome_decoder;
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

    logic [R-1:0] syn;
    logic [N-1:0] evec;
    logic err, corr_one, corr_two, ue;

    uep_syndrome_decoder #(.P(P), .D(D), .R(R)) dut (
      .syn(syn), .evec(evec), .err(err), .corr_one(corr_one), .corr_two(corr_two), .ue(ue));

    initial begin
      logic [N-1:0] exp_e;
      logic e_one, e_two;
      int npairs;
      npairs = 0;
      for (int s = 0; s < (1 << R); s++) begin
        syn = R'(s);
        #1;
        exp_e = '0;
        e_one = 0;
        e_two = 0;
        for (int i = 0; i < N; i++)
          if (HC.h[i][R-1:0] == R'(s)) begin
            exp_e[i] = 1'b1;
            e_one = 1;
          end
        for (int i = 0; i < P; i++)
          if ((HC.h[i][R-1:0] ^ HC.h[i+1][R-1:0]) == R'(s)) begin
            exp_e[i] = 1'b1;
            exp_e[i+1] = 1'b1;
            e_two = 1;
            npairs++;
          end
        checks++;
        if (evec !== exp_e) begin
          failures++;
          $display("FAIL P=%0d syn=%b evec %h expected %h", P, syn, evec, exp_e);
        end
        checks++;
        if (err !== (s != 0) || corr_one !== e_one || corr_two !== e_two
            || ue !== (s != 0 && !e_one && !e_two)) begin
          failures++;
          $display("FAIL P=%0d syn=%b flags %b%b%b%b", P, syn, err, corr_one, corr_two, ue);
        end
      end
      checks++;
      if (npairs != P) begin
        failures++;
        $display("FAIL P=%0d: %0d correctable pairs, expected %0d", P, npairs, P);
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
