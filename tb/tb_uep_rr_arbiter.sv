// tb_uep_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Random request patterns and random stalls (advance low). A model pointer
// gives the expected grant: the first requester at or after the pointer,
// cyclically; the pointer moves past the winner only when advance is high.
// Also checks that a requester held high is served within NREQ grants.
module tb_uep_rr_arbiter;

  localparam int unsigned NREQ = 5;

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n = 0;
  logic [NREQ-1:0] req = '0, grant;
  logic advance = 0;

  uep_rr_arbiter #(.NREQ(NREQ)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .advance(advance), .grant(grant));

  always #5 clk = ~clk;

  int ptr = 0;

  initial begin
    logic [NREQ-1:0] exp_g;
    int win, wait_cnt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req = NREQ'($urandom);
      if (t >= 3000) req[2] = 1'b1;
      advance = ($urandom_range(3) != 0);
      #1;
      exp_g = '0;
      win = -1;
      for (int k = 0; k < NREQ; k++)
        if (win < 0 && req[(ptr + k) % NREQ]) win = (ptr + k) % NREQ;
      if (win >= 0) exp_g[win] = 1'b1;
      checks++;
      if (grant !== exp_g) begin
        failures++;
        $display("FAIL t=%0d req=%b ptr=%0d grant=%b expected %b", t, req, ptr, grant, exp_g);
      end
      @(posedge clk);
      if (advance && win >= 0) ptr = (win + 1) % NREQ;
    end
    // fairness: a steady request is granted within NREQ advancing cycles
    @(negedge clk);
    req = '1;
    advance = 1;
    wait_cnt = 0;
    #1;
    while (!grant[4] && wait_cnt < 10) begin
      @(posedge clk);
      @(negedge clk);
      #1;
      wait_cnt++;
    end
    checks++;
    if (wait_cnt >= NREQ) begin
      failures++;
      $display("FAIL: requester 4 waited %0d cycles", wait_cnt);
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
