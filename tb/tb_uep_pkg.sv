// tb_uep_pkg: checks the parity-check matrices built by uep_pkg::build_h.
//
// For the three packet formats, (8,24,6), (16,48,7) and (8,56,7), every rule of the
// SEC-DAED-SDAEC code is checked exhaustively: no zero column, distinct
// columns, no adjacent-pair syndrome equal to a column (no forbidden 3-cycle),
// header and boundary pair syndromes unique among all pair syndromes (no
// forbidden 4-cycle). The (8,24,6) matrix is also compared column by column
// with a golden copy produced by an independent implementation of the same
// search. min_check_bits is checked against the check-bit bound for the three
// packet formats (8+24 -> 6, 8+56 -> 7, 16+48 -> 7). The two-input XOR count
// of the syndrome generator, sum over rows of (row weight - 1), is printed.
module tb_uep_pkg;
  import uep_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam logic [5:0] GOLD38 [38] = '{
    6'b100001, 6'b010100, 6'b001001, 6'b100010, 6'b010001, 6'b001010, 6'b000101, 6'b111001,
    6'b000111, 6'b001011, 6'b001101, 6'b001110, 6'b010110, 6'b010101, 6'b010011, 6'b100011,
    6'b100101, 6'b100110, 6'b101010, 6'b011010, 6'b011001, 6'b101001, 6'b110001, 6'b110010,
    6'b110100, 6'b101100, 6'b011100, 6'b011111, 6'b101111, 6'b110111, 6'b111011, 6'b111000,
    6'b100000, 6'b010000, 6'b001000, 6'b000100, 6'b000010, 6'b000001};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_code(input int p, input int d, input int r);
    hcode_t hc;
    int n, xors, maxrow, rowc;
    bit  ok;
    logic [MAXR-1:0] ps [MAXN];
    n  = p + d + r;
    hc = build_h(p, d, r);
    check(hc.ok == 1'b1, $sformatf("(%0d,%0d,%0d) construction", p, d, r));
    for (int i = 0; i < n; i++) begin
      check(hc.h[i] != '0, $sformatf("(%0d,%0d) column %0d non-zero", p, d, i));
      check(hc.h[i] < (MAXR'(1) << r), $sformatf("column %0d fits in r bits", i));
      ok = 1;
      for (int j = 0; j < i; j++) if (hc.h[i] == hc.h[j]) ok = 0;
      check(ok, $sformatf("(%0d,%0d) column %0d distinct", p, d, i));
    end
    for (int i = 0; i + 1 < n; i++) ps[i] = hc.h[i] ^ hc.h[i+1];
    for (int i = 0; i + 1 < n; i++) begin
      ok = 1;
      for (int j = 0; j < n; j++) if (ps[i] == hc.h[j]) ok = 0;
      check(ok, $sformatf("(%0d,%0d) pair %0d no 3FC", p, d, i));
    end
    for (int i = 0; i < p; i++) begin
      ok = 1;
      for (int j = 0; j + 1 < n; j++) if (j != i && ps[i] == ps[j]) ok = 0;
      check(ok, $sformatf("(%0d,%0d) header pair %0d no 4FC", p, d, i));
    end
    // identity block of the check bits
    for (int j = 0; j < r; j++)
      check(hc.h[p+d+j] == (MAXR'(1) << (r - 1 - j)), $sformatf("identity column %0d", j));
    xors = 0;
    maxrow = 0;
    for (int b = 0; b < r; b++) begin
      rowc = 0;
      for (int i = 0; i < n; i++) rowc += int'(hc.h[i][b]);
      xors += rowc - 1;
      if (rowc > maxrow) maxrow = rowc;
    end
    $display("(%0d,%0d,%0d): %0d two-input XORs, max row weight %0d", p, d, r, xors, maxrow);
  endtask

  initial begin
    hcode_t hc;
    check(min_check_bits(8, 24) == 6, "r for 8+24");
    check(min_check_bits(8, 56) == 7, "r for 8+56");
    check(min_check_bits(16, 48) == 7, "r for 16+48");
    check_code(8, 24, 6);
    check_code(16, 48, 7);
    check_code(8, 56, 7);
    hc = build_h(8, 24, 6);
    for (int i = 0; i < 38; i++)
      check(hc.h[i][5:0] == GOLD38[i], $sformatf("golden column %0d", i));
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
