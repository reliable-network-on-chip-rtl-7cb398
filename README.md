# Store-and-forward NoC router protected by an unequal-error-protection code

A router buffer holds whole packets long enough for a particle strike to flip
a bit, or two neighbouring bits, and a link can corrupt a packet in transit.
A plain single-error-correcting (SEC) code fixes one flipped bit. It
cannot deal with the second most likely event, a double adjacent upset. A
wrong header is the worst case: the packet is delivered to the wrong place,
and nobody knows whom to ask for a new copy.

This design spends exactly as many check bits as the SEC code, but gives them
unequal protection. The code is called SEC-DAED-SDAEC (single error
correcting, double adjacent error detecting, selective double adjacent error
correcting):

| error                                   | header | header/data boundary | data and check bits |
|-----------------------------------------|--------|----------------------|---------------------|
| one bit                                 | corrected | corrected         | corrected           |
| two adjacent bits                       | corrected | corrected         | detected (UE)       |
| anything else (rare for a single upset) | not guaranteed | not guaranteed | not guaranteed   |

Header errors of the expected kinds are always corrected. So when the data
part has an uncorrectable error (UE), the header still says where the packet
came from, and a retransmission can be requested instead of losing the
packet.

The RTL is SystemVerilog (IEEE 1800-2017), parameterised by header width `P`,
data width `D` and check-bit count `R`. The defaults are the 32-bit packet
format: an 8-bit header, 24 data bits and 6 check bits, a 38-bit codeword.
The 64-bit format (16 + 48 bits, 7 check bits) and the 8 + 56 format
(7 check bits) are obtained by setting `P` and `D`; `R` follows by default.

## The code

### Codeword layout

```
bit:   0 ........ P-1 | P ........ P+D-1 | P+D ...... P+D+R-1
       header          data                check bits
H  =  [     H1        |       H2         |       I         ]
```

Bits `i` and `i+1` are physically adjacent, so a double adjacent upset flips
exactly such a pair. Column `i` of the parity-check matrix H is the syndrome
of an error in bit `i`, and the syndrome of a pair is the XOR of its two
columns. The code is systematic: header and data are sent unchanged, and the
identity block gives each check bit its own row.

### What H must satisfy

1. No column is zero: every single error is seen.
2. All columns differ: every single error can be located. This also makes
   the pairs `<i,i+1>` and `<i+1,i+2>` differ.
3. No adjacent-pair syndrome equals a column (no "forbidden 3-cycle"), so a
   double adjacent error is never mistaken for a single one.
4. The syndromes of the `P` pairs `<i,i+1>`, `i = 0 .. P-1`, differ from
   every other pair syndrome (no "forbidden 4-cycle"). These are the `P-1`
   pairs inside the header plus the one that straddles the header/data
   boundary, so they can be corrected.

That needs `n + P` distinct non-zero syndromes, where `n = P + D + R`. So `R`
is the smallest value with `2^R - 1 >= n + P`. `uep_pkg::min_check_bits`
computes it: 6 for 8 + 24, 7 for 16 + 48 and for 8 + 56. These are the same
counts as a plain SEC code for those sizes.

### How the matrix is built

`uep_pkg::build_h` is a constant function: it builds H during elaboration, so
no table is stored and any `(P, D, R)` can be asked for. It fills the
columns greedily:

* `I` first, with the identity columns in order `100..0, 010..0, ...`.
* `H2` from left to right. A candidate column must be unused and must not
  close a forbidden 3-cycle with what is already placed. Among the
  candidates, the search prefers, in this order:
  * odd weight (two odd columns XOR to an even syndrome, which can never
    equal an odd column);
  * a pair syndrome that is already in use, so the data part uses up few
    distinct syndromes and leaves room for the header;
  * low weight;
  * the smallest value.
* `H1` from the boundary leftwards. A candidate is rejected if it, or its
  pair syndrome with its right neighbour, is already used by any column or
  pair. The search prefers even weight, then low weight.

This follows the published column-by-column search, minus its random picks
and backtracking, so the result is reproducible. The published method can
also grow a larger `H2` from a smaller one, by stacking two copies with one
row complemented and adding a row. That shortcut is not used here: the
direct search is fast enough at elaboration. The cost of the matrices it
finds, counted as `sum over rows (row weight - 1)` two-input XORs with logic
depth `ceil(log2(max row weight))`:

| format (P, D, R) | XOR gates | max row weight | XOR depth |
|------------------|-----------|----------------|-----------|
| 8, 24, 6         | 98        | 20             | 5         |
| 16, 48, 7        | 208       | 34             | 6         |
| 8, 56, 7         | 228       | 35             | 6         |

For reference, the original publication reports 104 gates at depth 5 and
240 gates at depth 6 for its own hand-searched (8,24,6) and (16,48,7)
matrices. Those matrices are not reproduced here; the ones above are
different codes that meet the same four rules. `tb/tb_uep_pkg.sv` checks the
rules exhaustively.

### Decoding

`uep_decoder` is purely combinational:

1. `uep_syndrome_gen`: `R` XOR trees form the syndrome.
2. `uep_syndrome_decoder`:
   * one equality compare per bit (the syndrome equals column `i`);
   * one compare per correctable pair (the syndrome equals column `i` XOR
     column `i+1`, for `i < P`);
   * error-vector bit `i` is the OR of its own match and the matches of the
     pairs that contain it, which is a 3-input OR in the header and a plain
     wire elsewhere;
   * `err` = syndrome non-zero; `ue` = `err` and no match.
3. `N` XORs apply the error vector.

Outputs: corrected codeword and message, syndrome, `err`, `corr_one` (single
error fixed), `corr_two` (header or boundary pair fixed) and `ue`. The rules
on H guarantee that at most one compare fires for every error the code is
built for. Other patterns, such as two non-adjacent flips, may alias to a
correctable syndrome and be miscorrected. The code makes no promise for
them.

`uep_encoder` copies header and data, and forms each check bit as the XOR of
the message bits whose column has a 1 in that row.

## The router

```
          +------------------------- uep_input_port (x5) ---------------------------+
link in ->| D+E: decode, correct, re-encode -> packet buffer -> decode -> re-encode  |-> crossbar -> link out
          |        |  UE: NACK, sender resends      |   UE: drop, request from source |    ^
          |                                         +-> destination -> XY route ----+-> round-robin
          +-------------------------------------------------------------------------+    arbiter per output
```

* **D+E stage** (`uep_de_stage`). Errors picked up on the link are corrected
  before the packet is stored, and the buffer receives a fresh codeword.
  Upsets in the buffer therefore start from a clean word.
* **Packet buffer** (`uep_packet_buffer`). A FIFO of `DEPTH` whole codewords,
  check bits included, so an upset while the packet waits is still covered.
  Store-and-forward: a packet is forwarded only after it is entirely held.
* **Head decode.** The oldest packet is decoded so that routing reads a
  corrected destination. The corrected message is then encoded again for the
  output link. Skipping this re-encode would save an encoder. Keeping it
  means a single upset in the buffer is scrubbed before the packet leaves, so
  two independent errors never add up downstream.
* **Routing** (`uep_xy_route`). XY dimension-ordered routing on a 2-D mesh.
  The router's position is set by `X`, `Y`.
* **Arbitration** (`uep_rr_arbiter`). One round-robin arbiter per output. The
  priority moves past the winner only when the packet actually leaves.
* **Retransmission.** An uncorrectable error is answered in one of two
  ways, depending on where the packet was damaged:
  * *On the link.* The sender still holds a clean copy: its output only
    releases a packet once the transfer succeeds. So the receiving input
    refuses the transfer with `in_nack`, in the same cycle. The sender sees
    the NACK on its `out_nack` input, keeps the packet at the head of its
    buffer and offers it again. Nothing is lost, and no other node gets
    involved.
  * *In the buffer.* Here the only copy in the router is damaged. The packet
    is dropped, and one cycle later `retx_valid[port]` pulses with the
    packet's header on `retx_hdr[port]`. The header is guaranteed correct,
    and its source field says which node must resend. Carrying this
    end-to-end request to the source is left to the system around the
    router.

### Packet and header format

A packet is one codeword and crosses a link in one transfer. The header is
split in two:

* `header[P/2-1:0]` is the destination `{y, x}`;
* `header[P-1:P/2]` is the source `{y, x}`.

Each coordinate has `P/4` bits, so the 8-bit header addresses a 4 x 4 mesh.
Ports are numbered by `uep_pkg::port_e`:

| LOCAL | NORTH | EAST | SOUTH | WEST |
|-------|-------|------|-------|------|
| 0     | 1     | 2    | 3     | 4    |

NORTH is towards smaller `y`.

### Interface and timing of `uep_router`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 5 | input links, a packet moves when both are high and `in_nack` is low |
| `in_cw` | in | 5 x N | input codewords |
| `in_nack` | out | 5 | link retransmission request: the offered packet is uncorrectable, send it again (combinational from `in_cw`) |
| `out_valid`, `out_ready` | out / in | 5 | output links, same rule |
| `out_cw` | out | 5 x N | output codewords, freshly encoded |
| `out_nack` | in | 5 | the next router refuses the packet; it stays and is offered again |
| `retx_valid`, `retx_hdr` | out | 5, 5 x P | end-to-end retransmission requests for packets dropped from a buffer, one cycle after the drop, no back-pressure |
| `events` | out | 5 x 6 | per-input error events this cycle (`uep_pkg::err_events_t`): link single / pair / UE, buffer single / pair / UE |

A packet accepted at a clock edge can leave in the next cycle. `out_valid` and
`out_cw` are combinational from the buffer heads. `in_ready` depends only on
buffer state. `in_nack` goes through the link decoder, and the upstream
router uses it only to decide whether to pop, never to form `out_valid` or
`out_cw`. So routers can be chained without combinational loops. The path
from a link through the decoder to the upstream pop is the longest one.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `P` | 8 | header bits (16 for the 64-bit format) |
| `D` | 24 | data bits (48 or 56 for the 64-bit formats) |
| `R` | `min_check_bits(P, D)` = 6 | check bits |
| `DEPTH` | 4 | packets per input buffer |
| `X`, `Y` | 1, 1 | position of the router in the mesh |

## What comes from the method and what is this design's own

Taken from the method:

* the code: its four rules on H, the `[H1 | H2 | I]` shape, and the
  check-bit bound;
* the search strategy for H;
* the decoder structure: syndrome, compares, 3-input ORs in the header, UE
  flag, correcting XORs;
* the place of the codec in a store-and-forward router: decode and encode at
  the input, store encoded, decode for routing;
* retransmission on UE, using the header's source address.

This design's own choices:

* the exact H matrices (see above);
* the bit order of the codeword;
* re-encoding at the output instead of reusing the stored check bits;
* the two retransmission paths: NACK per hop, and drop plus an end-to-end
  request;
* five ports, XY routing, round-robin arbitration;
* buffer depth, handshakes, header address format and reset behaviour.

## Using and checking it

Every file in `rtl/` holds one module or package. Modules find their
submodules by name, so with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/uep_pkg.sv tb/tb_uep_router.sv --top-module tb_uep_router
./obj_dir/Vtb_uep_router
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops; a
watchdog ends a hung run as a failure.

| testbench | what it shows |
|-----------|---------------|
| `tb_uep_pkg` | the four rules on H for (8,24,6), (16,48,7), (8,56,7); `R` for the three formats; the (8,24,6) matrix against a golden copy from an independent implementation; prints gate counts |
| `tb_uep_encoder` | message copied, syndrome zero, check bits as computed from H (three formats) |
| `tb_uep_syndrome_gen` | syndrome of zero, single-bit and random words |
| `tb_uep_syndrome_decoder` | all `2^R` syndromes against an error vector found by searching H |
| `tb_uep_decoder` | every single and every adjacent double error on random words: corrected or flagged as the table at the top says |
| `tb_uep_de_stage` | link stage output is the clean codeword, or UE |
| `tb_uep_packet_buffer` | FIFO order, full and empty against a queue model |
| `tb_uep_xy_route` | every destination from two router positions |
| `tb_uep_rr_arbiter` | grants against a round-robin model, fairness |
| `tb_uep_input_port` | link errors and NACKed resends, upsets written into the buffered head, drops, retransmission headers, back-pressure |
| `tb_uep_router` | whole router at default size for 20,000 cycles. Every error kind occurs thousands of times. The testbench also NACKs some outputs. Outputs are checked against a per-input model, and every packet that survives must come out. Every link UE must be NACKed and resent, and every buffer UE must produce a request carrying the right header. Stalls, back-pressure and output conflicts are counted. |
| `tb_uep_router_64` | the same test with the (16,48,7) code |

The router testbenches inject buffer upsets by writing into
`g_in[k].u_port.u_buf.mem` through hierarchical references.

## Limits

* Only single and double adjacent errors are handled as designed. Wider
  bursts and random double errors can be miscorrected, by the nature of the
  code.
* A packet dropped from a buffer for UE is gone from this router. Recovery
  depends on the source keeping a copy and honouring the end-to-end request,
  which is outside this RTL. Those requests are raised without
  back-pressure.
* A link that keeps corrupting the same packet gets it NACKed over and over;
  there is no retry limit.
* The decoders sit on the input-to-buffer path and on the
  buffer-to-output path, with no pipeline register. At high clock rates, a
  register may be needed after the XOR depth listed above.
* `build_h` supports codewords up to 128 bits and up to 8 check bits. For a
  size where its greedy search fails, elaboration stops with an error.
