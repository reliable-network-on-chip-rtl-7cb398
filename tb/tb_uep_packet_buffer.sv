// tb_uep_packet_buffer: self-checking test of the store-and-forward buffer.
//
// Random push/pop traffic (never pushing into a full buffer without popping,
// never popping an empty one) against a queue model: the head must always be
// the oldest packet, and empty/full must match the model's occupancy. Every
// occupancy from empty to full is reached.
module tb_uep_packet_buffer;

  localparam int unsigned W = 38;
  localparam int unsigned DEPTH = 4;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic clk = 0;
  logic rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, head;
  logic empty, full;

  uep_packet_buffer #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop),
    .head(head), .empty(empty), .full(full));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic [W-1:0] model [$];
  int seen_full = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
        failures++;
        $display("FAIL t=%0d: empty=%b full=%b size=%0d", t, empty, full, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (head !== model[0]) begin
          failures++;
          $display("FAIL t=%0d: head %h expected %h", t, head, model[0]);
        end
      end
      if (full) seen_full++;
      pop  = (model.size() > 0) && ($urandom_range(99) < ((t / 500) % 2 ? 70 : 30));
      push = ((model.size() < DEPTH) || pop) && ($urandom_range(99) < 50);
      din  = W'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0;
      pop = 0;
    end
    checks++;
    if (seen_full == 0) begin
      failures++;
      $display("FAIL: buffer never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
