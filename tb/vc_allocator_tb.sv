// Testbench for vc_allocator (P=5, V=4): random requests, routed ports and
// free output VCs. A reference model of the two arbitration stages (VA1
// round-robin over the free VCs of the routed port for every input VC, VA2
// round-robin over the input VCs that picked an output VC) with its own
// pointers predicts every grant and granted VC. Safety rules are checked
// separately: a grant only to a requester, only of a free VC at its port,
// and no output VC granted twice.
module vc_allocator_tb;
  localparam int unsigned P = 5, V = 4, N = P * V;

  logic clk = 0, rst;
  logic [N-1:0] req, ovc_free, grant;
  logic [N-1:0][2:0] req_port;
  logic [N-1:0][1:0] grant_vc;
  int checks = 0, failures = 0;
  int p1[N], p2[N];
  int conflicts = 0;

  vc_allocator #(.P(P), .V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1[N];       // VA1 choice (output VC index in 0..N-1) or -1
    int w2[N];       // VA2 winner per output VC or -1
    int e_gnt[N], e_vc[N];
    logic [N-1:0] used;
    rst = 1; req = '0; ovc_free = '0; req_port = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < N; i++) begin p1[i] = 0; p2[i] = 0; end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        req[i]      = $urandom % 3 == 0;
        req_port[i] = 3'($urandom % P);
        ovc_free[i] = $urandom % 4 != 0;
      end
      // reference VA1
      for (int i = 0; i < N; i++) begin
        c1[i] = -1;
        if (req[i])
          for (int k = 0; k < V; k++) begin
            automatic int v = (p1[i] + k) % V;
            if (c1[i] < 0 && ovc_free[int'(req_port[i]) * V + v]) c1[i] = int'(req_port[i]) * V + v;
          end
      end
      // reference VA2
      for (int o = 0; o < N; o++) begin
        automatic int n = 0;
        w2[o] = -1;
        for (int k = 0; k < N; k++) begin
          automatic int i = (p2[o] + k) % N;
          if (c1[i] == o) begin n++; if (w2[o] < 0) w2[o] = i; end
        end
        if (n > 1) conflicts++;
      end
      for (int i = 0; i < N; i++) begin e_gnt[i] = 0; e_vc[i] = 0; end
      for (int o = 0; o < N; o++) if (w2[o] >= 0) begin e_gnt[w2[o]] = 1; e_vc[w2[o]] = o % V; end
      #1;
      used = '0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (grant[i] != e_gnt[i][0] || (grant[i] && int'(grant_vc[i]) != e_vc[i])) begin
          failures++;
          $display("cycle %0d in VC %0d: grant %b vc %0d, expected %0d vc %0d", cyc, i, grant[i], grant_vc[i], e_gnt[i], e_vc[i]);
        end
        if (grant[i]) begin
          automatic int o = int'(req_port[i]) * V + int'(grant_vc[i]);
          checks++;
          if (!req[i] || !ovc_free[o] || used[o]) begin failures++; $display("unsafe grant to %0d", i); end
          used[o] = 1'b1;
        end
      end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) if (e_gnt[i]) p1[i] = (e_vc[i] + 1) % V;
      for (int o = 0; o < N; o++) if (w2[o] >= 0) p2[o] = (w2[o] + 1) % N;
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no VA2 conflict was exercised"); end
    $display("VA2 conflicts exercised: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
