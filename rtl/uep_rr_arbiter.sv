// uep_rr_arbiter: round-robin arbiter of one router output.
//
// Grants one of NREQ requests (one-hot grant, combinational). The search starts
// at the requester after the last one served; the priority pointer moves only
// when advance is high (the granted packet actually left), so a grant is held
// while the output is stalled. Active-low synchronous reset sets the pointer to
// requester 0. The round-robin policy is this design's choice.
module uep_rr_arbiter #(
  parameter int unsigned NREQ = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic            advance,
  output logic [NREQ-1:0] grant
);

  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] prio;     // requester with the highest priority
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = prio;
    for (int unsigned k = 0; k < NREQ; k++) begin
      logic [IW:0] idx;
      idx = (IW+1)'(prio) + (IW+1)'(k);
      if (idx >= (IW+1)'(NREQ)) idx = idx - (IW+1)'(NREQ);
      if (req[IW'(idx)] && grant == '0) begin
        grant[IW'(idx)] = 1'b1;
        win = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                   prio <= '0;
    else if (advance && |grant)   prio <= (win == IW'(NREQ - 1)) ? '0 : win + 1'b1;
  end

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
