// Testbench for router_control (P=5, V=4, K=4). The input VC buffers are
// modelled by queues in the testbench; the control's pops drain them and a
// log records every flit switched. Directed scenarios check:
//  A  a 3-flit packet: VC allocation takes one cycle, then one flit per
//     cycle, all on one output VC, through the routed port, with the
//     crossbar select naming the input port;
//  B  credit stall: with no credits returned only K flits leave, and each
//     returned credit lets one more go;
//  C  VC exhaustion: a fifth packet to a port whose V output VCs are all
//     held waits, and gets a VC once a tail releases one;
//  D  switch contention: two input ports streaming to one output alternate.
// Every switched flit is also checked for a consistent crossbar setting.
module router_control_tb;
  import router_pkg::*;
  localparam int unsigned P = 5, V = 4, K = 4, DATA_W = 8, N = P * V;

  logic clk = 0, rst;
  logic [P-1:0][V-1:0] vc_empty, pop, credit_in;
  logic [P-1:0][V-1:0][1:0] front_type;
  logic [P-1:0][V-1:0][DATA_W-1:0] front_data;
  logic [P-1:0][1:0] sel_vc, send_vc;
  logic [P-1:0] xbar_en;
  logic [P-1:0][2:0] xbar_sel;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [9:0] q[N][$];
  // log of switched flits
  int log_cyc[$], log_ip[$], log_iv[$], log_op[$], log_ovc[$];

  router_control #(.P(P), .V(V), .K(K), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: FAIL %s", cycle, what); end
  endtask

  // one clock cycle: present queue fronts, sample, apply pops and credits
  task automatic step(input logic [P-1:0][V-1:0] credits = '0);
    logic [P-1:0][V-1:0] popped;
    for (int i = 0; i < N; i++) begin
      vc_empty[i / V][i % V]   = q[i].size() == 0;
      front_type[i / V][i % V] = q[i].size() ? q[i][0][9:8] : 2'b00;
      front_data[i / V][i % V] = q[i].size() ? q[i][0][7:0] : 8'h00;
    end
    credit_in = credits;
    #1;
    for (int ip = 0; ip < P; ip++) begin
      for (int iv = 0; iv < V; iv++) if (pop[ip][iv]) begin
        automatic int op = -1, n = 0;
        check(q[ip * V + iv].size() > 0, "pop of an empty VC");
        check(int'(sel_vc[ip]) == iv, "output mux select differs from popped VC");
        for (int o = 0; o < P; o++) if (xbar_en[o] && int'(xbar_sel[o]) == ip) begin op = o; n++; end
        check(n == 1, "popped input not connected to exactly one output");
        log_cyc.push_back(cycle); log_ip.push_back(ip); log_iv.push_back(iv);
        log_op.push_back(op); log_ovc.push_back(int'(send_vc[ip]));
      end
    end
    for (int o = 0; o < P; o++) if (xbar_en[o])
      check(pop[int'(xbar_sel[o])] != 0, "crossbar enabled without a pop");
    popped = pop;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) if (popped[i / V][i % V] && q[i].size()) void'(q[i].pop_front());
    cycle++;
  endtask

  function automatic logic [9:0] flit(input flit_type_e t, input logic [7:0] d);
    return {t, d};
  endfunction

  initial begin
    int n0, ovc_b, first;
    rst = 1; vc_empty = '1; front_type = '0; front_data = '0; credit_in = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;

    // ---- A: 3-flit packet, port 0 VC 1 -> output 2
    q[0 * V + 1] = '{flit(FLIT_HEAD, 8'h02), flit(FLIT_BODY, 8'hA5), flit(FLIT_TAIL, 8'h5A)};
    cycle = 0; log_cyc.delete();
    repeat (6) step();
    check(log_cyc.size() == 3, "A: three flits switched");
    if (log_cyc.size() == 3) begin
      check(log_cyc[0] == 1 && log_cyc[1] == 2 && log_cyc[2] == 3, "A: VA one cycle, then one flit per cycle");
      for (int k = 0; k < 3; k++) begin
        check(log_op[k] == 2 && log_ip[k] == 0 && log_iv[k] == 1, "A: route to output 2");
        check(log_ovc[k] == log_ovc[0], "A: same output VC for whole packet");
      end
    end
    // give back the 3 credits of that output VC
    if (log_ovc.size() > 0) begin
      automatic logic [P-1:0][V-1:0] cr = '0;
      cr[2][log_ovc[0]] = 1'b1;
      repeat (3) step(cr);
    end

    // ---- B: credit stall, port 1 VC 0 -> output 3, K+2 flits
    q[1 * V + 0].push_back(flit(FLIT_HEAD, 8'h03));
    for (int k = 0; k < K; k++) q[1 * V + 0].push_back(flit(FLIT_BODY, 8'(k)));
    q[1 * V + 0].push_back(flit(FLIT_TAIL, 8'hEE));
    log_cyc.delete(); log_ovc.delete(); log_op.delete(); log_ip.delete(); log_iv.delete();
    repeat (12) step();
    check(log_cyc.size() == K, "B: only K flits leave without credits");
    ovc_b = log_ovc.size() ? log_ovc[0] : 0;
    for (int k = 0; k < 2; k++) begin
      automatic logic [P-1:0][V-1:0] cr = '0;
      cr[3][ovc_b] = 1'b1;
      n0 = log_cyc.size();
      step(cr);
      repeat (3) step();
      check(log_cyc.size() == n0 + 1, "B: one returned credit releases one flit");
    end
    begin
      automatic logic [P-1:0][V-1:0] cr = '0;
      cr[3][ovc_b] = 1'b1;
      repeat (K) step(cr);
    end

    // ---- C: five packets to output 4; the first V hold every output VC
    log_cyc.delete(); log_ovc.delete(); log_op.delete(); log_ip.delete(); log_iv.delete();
    for (int p = 0; p < V; p++) q[p * V + 2].push_back(flit(FLIT_HEAD, 8'h04));
    q[4 * V + 3].push_back(flit(FLIT_HEAD, 8'h04));
    repeat (10) step();
    begin
      automatic int from_fifth = 0;
      bit seen[V];
      foreach (log_ip[k]) begin
        if (log_ip[k] == 4) from_fifth++;
        else seen[log_ovc[k]] = 1;
      end
      check(log_cyc.size() == V && from_fifth == 0, "C: fifth packet waits for a free output VC");
      for (int v = 0; v < V; v++) check(seen[v], "C: each output VC used once");
    end
    // the tail of the packet from port 0 frees its VC
    q[0 * V + 2].push_back(flit(FLIT_TAIL, 8'h00));
    repeat (6) step();
    begin
      automatic int from_fifth = 0, freed = -1, got = -2;
      foreach (log_ip[k]) begin
        if (log_ip[k] == 0) freed = log_ovc[k];
        if (log_ip[k] == 4) begin from_fifth++; got = log_ovc[k]; end
      end
      check(from_fifth == 1 && got == freed, "C: released VC goes to the waiting packet");
    end
    // finish the open packets and return all credits to output 4
    for (int p = 1; p < V; p++) q[p * V + 2].push_back(flit(FLIT_TAIL, 8'h00));
    q[4 * V + 3].push_back(flit(FLIT_TAIL, 8'h00));
    repeat (6) step();
    begin
      automatic logic [P-1:0][V-1:0] cr = '0;
      cr[4] = '1;
      repeat (2) step(cr);
    end

    // ---- D: ports 2 and 3 each stream 3 flits to output 0, credits returned at once
    log_cyc.delete(); log_ovc.delete(); log_op.delete(); log_ip.delete(); log_iv.delete();
    for (int p = 2; p <= 3; p++) begin
      q[p * V + 0] = '{flit(FLIT_HEAD, 8'h00), flit(FLIT_BODY, 8'h11), flit(FLIT_TAIL, 8'h22)};
    end
    for (int c = 0; c < 12; c++) begin
      automatic logic [P-1:0][V-1:0] cr = '0;
      if (c > 0 && log_cyc.size() > 0 && log_cyc[log_cyc.size() - 1] == cycle - 1)
        cr[0][log_ovc[log_ovc.size() - 1]] = 1'b1;
      step(cr);
    end
    check(log_cyc.size() == 6, "D: six flits through output 0");
    first = 0;
    for (int k = 1; k < log_cyc.size(); k++) begin
      check(log_cyc[k] == log_cyc[k - 1] + 1, "D: output 0 busy every cycle");
      check(log_ip[k] != log_ip[k - 1], "D: inputs alternate on output 0");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
