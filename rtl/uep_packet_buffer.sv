// uep_packet_buffer: store-and-forward packet buffer of a router input.
//
// A FIFO of DEPTH whole packets, each stored as its W-bit codeword (check bits
// included, so an upset while the packet waits is caught when it is read). The
// oldest packet is always visible on head with no read latency. push and pop
// may happen in the same cycle, also when the buffer is full. Pushing into a
// full buffer or popping an empty one is a usage error, flagged by assertions.
// Active-low synchronous reset empties the buffer; the storage itself is not
// reset. Depth and the two-pointer organisation are this design's choice.
module uep_packet_buffer #(
  parameter int unsigned W     = 38,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  assign head  = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
