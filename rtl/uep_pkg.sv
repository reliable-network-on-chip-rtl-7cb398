// uep_pkg: shared constants and the parity-check matrix of the SEC-DAED-SDAEC
// unequal-error-protection code.
//
// A packet of p header bits and d data bits is protected by r check bits; the
// codeword of n = p + d + r bits is laid out as cw[0 .. p-1] = header,
// cw[p .. k-1] = data, cw[k .. n-1] = check bits (k = p + d). Bits i and i+1
// are physically adjacent, so a double-adjacent upset flips cw[i] and cw[i+1].
// Column i of H is the syndrome of a single error in bit i. The code must:
//   1) have no all-zero column, 2) have distinct columns,
//   3) give every adjacent pair (i,i+1) a syndrome that is no column
//      (double adjacent errors are detected everywhere),
//   4) give the p pairs (i,i+1), i < p, a syndrome shared with no other pair
//      (double adjacent errors in the header and on the header/data boundary
//      are corrected).
// These rules and the H = [H1 | H2 | I] shape follow the code's definition.
// The matrix itself is computed here by build_h, at elaboration time, with a
// deterministic form of the column-by-column search: I is placed first, then
// H2 left to right, each column chosen among those that form no forbidden
// 3-cycle, preferring odd weight and then double-adjacent syndromes that are
// already in use (fewer distinct syndromes spent on the data part leave more
// for the header); then H1 right to left from the header/data boundary, each
// column chosen so that neither it nor its pair syndrome with its right
// neighbour is already in use, preferring even and then low weight. Ties go
// to the smallest column value. The search of the original method picks at
// random and backtracks; this one does neither, so it is reproducible, and it
// finds codes for the 8+24, 8+56 and 16+48 packets. build_h returns ok = 0 if
// it gets stuck, and the modules then stop elaboration with $fatal.
// Column values are written with syndrome bit r-1 as the leftmost digit; the
// check bit at position k+j has the single syndrome bit r-1-j, so the identity
// block reads 100..0, 010..0, ... from left to right.
package uep_pkg;

  localparam int unsigned MAXN = 128;  // longest codeword build_h supports
  localparam int unsigned MAXR = 8;    // most check bits build_h supports

  // H stored column by column: h[i] is column i (the syndrome of bit i).
  typedef logic [MAXN-1:0][MAXR-1:0] hmat_t;

  typedef struct packed {
    logic  ok;
    hmat_t h;
  } hcode_t;

  // Smallest r with 2^r - 1 >= n + p where n = p + d + r: one syndrome per
  // single error and one per correctable double-adjacent error.
  function automatic int unsigned min_check_bits(int unsigned p, int unsigned d);
    int unsigned r;
    r = 1;
    while (((1 << r) - 1) < (2 * p + d + r)) r++;
    return r;
  endfunction

  function automatic int unsigned popcount(logic [MAXR-1:0] v);
    int unsigned c;
    c = 0;
    for (int b = 0; b < int'(MAXR); b++) c += int'(v[b]);
    return c;
  endfunction

  // Deterministic construction of H for a packet of p header bits and d data
  // bits protected by r check bits (n = p + d + r).
  function automatic hcode_t build_h(int unsigned p, int unsigned d, int unsigned r);
    hcode_t      res;
    logic [255:0] used_col;   // syndromes taken by a column
    logic [255:0] used_pair;  // syndromes taken by an adjacent-pair error
    int unsigned n, k, best, best_key, key, w, nc;
    logic [MAXR-1:0] c, s, s2;
    n = p + d + r;
    k = p + d;
    res.ok = 1'b1;
    res.h = '0;
    used_col = '0;
    used_pair = '0;
    if (n > MAXN || r > MAXR || r < 2 || p < 1 || d < 1) begin
      res.ok = 1'b0;
      return res;
    end
    nc = 1 << r;
    // identity block
    for (int j = 0; j < int'(r); j++) begin
      res.h[k+j] = MAXR'(1) << (r - 1 - j);
      used_col[res.h[k+j]] = 1'b1;
    end
    for (int j = 0; j + 1 < int'(r); j++)
      used_pair[res.h[k+j] ^ res.h[k+j+1]] = 1'b1;
    // H2: data columns, left to right; the last one also pairs with I
    for (int pos = int'(p); pos < int'(k); pos++) begin
      best = 0;
      best_key = '1;
      for (int v = 1; v < int'(nc); v++) begin
        c = MAXR'(v);
        w = popcount(c);
        s = (pos > int'(p)) ? (c ^ res.h[pos-1]) : '0;
        s2 = (pos == int'(k) - 1) ? (c ^ res.h[k]) : '0;
        if (w >= 2 && !used_col[c] && !used_pair[c]
            && !(pos > int'(p) && used_col[s])
            && !(pos == int'(k) - 1 && used_col[s2])
            && !(pos > int'(p) && pos == int'(k) - 1 && s == s2)) begin
          key = ((w % 2 == 0) ? 32'h0100_0000 : 0)
              + (((pos > int'(p) && !used_pair[s]) ? 1 : 0) << 16)
              + (((pos == int'(k) - 1 && !used_pair[s2]) ? 1 : 0) << 16)
              + (w << 8) + v;
          if (key < best_key) begin
            best_key = key;
            best = v;
          end
        end
      end
      if (best == 0) begin
        res.ok = 1'b0;
        return res;
      end
      res.h[pos] = MAXR'(best);
      used_col[res.h[pos]] = 1'b1;
      if (pos > int'(p)) used_pair[res.h[pos] ^ res.h[pos-1]] = 1'b1;
      if (pos == int'(k) - 1) used_pair[res.h[pos] ^ res.h[k]] = 1'b1;
    end
    // H1: header columns, right to left; pair (pos, pos+1) must be unique
    for (int pos = int'(p) - 1; pos >= 0; pos--) begin
      best = 0;
      best_key = '1;
      for (int v = 1; v < int'(nc); v++) begin
        c = MAXR'(v);
        w = popcount(c);
        s = c ^ res.h[pos+1];
        if (w >= 2 && !used_col[c] && !used_pair[c] && !used_col[s] && !used_pair[s]
            && s != c) begin
          key = ((w % 2 == 1) ? 32'h0100_0000 : 0) + (w << 8) + v;
          if (key < best_key) begin
            best_key = key;
            best = v;
          end
        end
      end
      if (best == 0) begin
        res.ok = 1'b0;
        return res;
      end
      res.h[pos] = MAXR'(best);
      used_col[res.h[pos]] = 1'b1;
      used_pair[res.h[pos] ^ res.h[pos+1]] = 1'b1;
    end
    return res;
  endfunction

  // Router port numbering.
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  localparam int unsigned NUM_PORTS = 5;

  // Error events seen by one router input port in one cycle: at the link
  // (D + E stage) and when the buffered packet is read for routing.
  typedef struct packed {
    logic in_corr_one;   // link: single error corrected
    logic in_corr_two;   // link: header double adjacent error corrected
    logic in_ue;         // link: uncorrectable, packet dropped, retransmission
    logic buf_corr_one;  // buffer: single error corrected on read
    logic buf_corr_two;  // buffer: header double adjacent error corrected
    logic buf_ue;        // buffer: uncorrectable, packet dropped, retransmission
  } err_events_t;

endpackage
