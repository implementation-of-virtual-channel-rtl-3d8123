// Testbench for rr_arbiter: random request patterns and random pointer
// updates, compared each cycle with a reference round-robin model kept in
// the testbench (pointer, then search in circular order). Also checks that
// a requester that keeps losing is served within N grants.
module rr_arbiter_tb;
  localparam int unsigned N = 4;

  logic         clk = 0, rst;
  logic [N-1:0] req, grant;
  logic [1:0]   grant_idx;
  logic         any_grant, update;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_winner(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    int w, waited;
    rst = 1; req = '0; update = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0; ptr = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      req    = N'($urandom);
      update = ($urandom % 4) != 0;
      #1;
      w = ref_winner(req, ptr);
      checks++;
      if (w < 0) begin
        if (any_grant || grant != 0) begin failures++; $display("grant without request"); end
      end else if (!any_grant || grant != (N'(1) << w) || int'(grant_idx) != w) begin
        failures++;
        $display("cycle %0d req=%b ptr=%0d: expected %0d, got grant=%b", cyc, req, ptr, w, grant);
      end
      @(posedge clk); #1;
      if (update && w >= 0) ptr = (w + 1) % N;
    end
    // fairness: all request, always update; requester 3 waits at most N-1 grants
    req = '1; update = 1; waited = 0;
    repeat (3 * N) begin
      #1;
      checks++;
      if (grant[3]) waited = 0; else waited++;
      if (waited >= N) begin failures++; $display("requester 3 starved"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
