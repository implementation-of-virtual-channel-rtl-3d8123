// Testbench for switch_allocator (P=5, V=4): random ready VCs and output
// ports. A reference model of SA1 (round-robin over the ready VCs of each
// input port, pointer moved only when the port wins SA2) and SA2
// (round-robin over the input ports whose SA1 winner wants the output)
// predicts the input grants, granted VCs and crossbar controls. Also checks
// that no input port is connected to two outputs.
module switch_allocator_tb;
  localparam int unsigned P = 5, V = 4, N = P * V;

  logic clk = 0, rst;
  logic [N-1:0] req;
  logic [N-1:0][2:0] req_port;
  logic [P-1:0] in_grant, out_valid;
  logic [P-1:0][1:0] in_grant_vc;
  logic [P-1:0][2:0] out_sel;
  int checks = 0, failures = 0;
  int p1[P], p2[P];
  int sa1_conflicts = 0, sa2_conflicts = 0;

  switch_allocator #(.P(P), .V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1[P], w2[P], e_in[P];
    rst = 1; req = '0; req_port = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < P; i++) begin p1[i] = 0; p2[i] = 0; end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        req[i]      = $urandom % 3 == 0;
        req_port[i] = 3'($urandom % P);
      end
      for (int ip = 0; ip < P; ip++) begin
        automatic int n = 0;
        w1[ip] = -1;
        for (int k = 0; k < V; k++) begin
          automatic int v = (p1[ip] + k) % V;
          if (req[ip * V + v]) begin n++; if (w1[ip] < 0) w1[ip] = v; end
        end
        if (n > 1) sa1_conflicts++;
        e_in[ip] = 0;
      end
      for (int op = 0; op < P; op++) begin
        automatic int n = 0;
        w2[op] = -1;
        for (int k = 0; k < P; k++) begin
          automatic int ip = (p2[op] + k) % P;
          if (w1[ip] >= 0 && int'(req_port[ip * V + w1[ip]]) == op) begin
            n++; if (w2[op] < 0) w2[op] = ip;
          end
        end
        if (n > 1) sa2_conflicts++;
        if (w2[op] >= 0) e_in[w2[op]] = 1;
      end
      #1;
      for (int ip = 0; ip < P; ip++) begin
        checks++;
        if (in_grant[ip] != e_in[ip][0] || (e_in[ip] != 0 && int'(in_grant_vc[ip]) != w1[ip])) begin
          failures++;
          $display("cycle %0d in port %0d: grant %b vc %0d, expected %0d vc %0d", cyc, ip, in_grant[ip], in_grant_vc[ip], e_in[ip], w1[ip]);
        end
      end
      for (int op = 0; op < P; op++) begin
        checks++;
        if (out_valid[op] != (w2[op] >= 0) || (w2[op] >= 0 && int'(out_sel[op]) != w2[op])) begin
          failures++;
          $display("cycle %0d out port %0d: valid %b sel %0d, expected %0d", cyc, op, out_valid[op], out_sel[op], w2[op]);
        end
      end
      @(posedge clk); #1;
      for (int ip = 0; ip < P; ip++) if (e_in[ip] != 0) p1[ip] = (w1[ip] + 1) % V;
      for (int op = 0; op < P; op++) if (w2[op] >= 0) p2[op] = (w2[op] + 1) % P;
    end
    checks++;
    if (sa1_conflicts == 0 || sa2_conflicts == 0) begin failures++; $display("conflicts not exercised"); end
    $display("SA1 conflicts %0d, SA2 conflicts %0d", sa1_conflicts, sa2_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
