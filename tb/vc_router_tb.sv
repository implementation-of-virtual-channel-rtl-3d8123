// End-to-end testbench for vc_router at its default size (P=5, V=4, K=4,
// 8-bit data). The testbench plays the five upstream routers and the five
// downstream routers:
//  - sources keep one packet in progress per VC, interleave flits of
//    different VCs on the link, and obey the credits returned on credit_out;
//  - sinks check every flit that leaves and return its credit after a random
//    delay, sometimes holding credits back for a while to stall the router.
// A header carries its destination code in data[2:0] and, for checking only,
// the source port in data[5:3] and source VC in data[7:6]; body and tail
// flits carry random data. The scoreboard keeps the packets of each source
// VC in order and checks that each arrives whole, in order, on the port its
// code selects (codes 5..7 go to port 4), on one output VC with no other
// packet interleaved.
// Phases: (1) pipeline latency: a header driven in cycle t must be on the
// output in cycle t+3 (buffer write, VC allocation, switch allocation and
// traversal), and the flits of a 4-flit packet must follow one per cycle; (2) a routing pattern like the reference
// waveform: every input sends single-flit packets whose low three bits name
// each output in turn; (3) random traffic with a hot spot on the local port.
// Each mechanism of the router (VA, VA2 conflict, VA stall for lack of a
// free VC, SA1 and SA2 conflicts, credit stall, full input buffer, single
// and multi-flit packets, unused route codes) is counted and must occur.
module vc_router_tb;
  import router_pkg::*;
  localparam int unsigned P = 5, V = 4, K = 4, DATA_W = 8;

  logic clk = 0, rst;
  logic [P-1:0] in_valid, out_valid;
  logic [P-1:0][1:0] in_type, out_type;
  logic [P-1:0][1:0] in_vc, out_vc;
  logic [P-1:0][DATA_W-1:0] in_data, out_data;
  logic [P-1:0][V-1:0] credit_out, credit_in;

  vc_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: FAIL %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sources
  typedef logic [9:0] flit_t;           // {type, data}
  flit_t  pend[P][V][$];                // flits of the packet being sent per source VC
  flit_t  expq[P][V][$];                // all flits in flight per source VC
  int     exp_len[P][V][$];             // length of each packet in flight
  int     exp_dst[P][V][$];             // destination port of each packet in flight
  longint exp_t0[P][V][$];              // cycle the header was sent
  int     src_cred[P][V];
  int     pkts_left[P];
  int     hot_pct = 0;                  // percent of packets to the local port
  int     load_pct = 0;                 // chance a source port sends in a cycle

  function automatic int dest_of(input logic [2:0] code);
    return code < P ? int'(code) : P - 1;
  endfunction

  task automatic new_packet(input int sp, input int sv, input int len, input logic [2:0] code);
    logic [7:0] head;
    head = {2'(sv), 3'(sp), code};
    for (int k = 0; k < len; k++) begin
      flit_t f;
      flit_type_e t;
      if (len == 1)        t = FLIT_HEAD_TAIL;
      else if (k == 0)     t = FLIT_HEAD;
      else if (k == len-1) t = FLIT_TAIL;
      else                 t = FLIT_BODY;
      f = {t, (k == 0) ? head : 8'($urandom)};
      pend[sp][sv].push_back(f);
      expq[sp][sv].push_back(f);
    end
    exp_len[sp][sv].push_back(len);
    exp_dst[sp][sv].push_back(dest_of(code));
    exp_t0[sp][sv].push_back(-1);
  endtask

  // ------------------------------------------------------------ sinks
  int     cur_src_p[P][V], cur_src_v[P][V], cur_left[P][V];
  int     sink_pending[P][V];
  int     sink_hold[P];
  int     delivered_flits = 0, delivered_pkts = 0;
  int     last_latency = -1;
  longint lat_sum = 0;

  // mechanism counters
  int n_va = 0, n_va2_conflict = 0, n_va_stall = 0, n_sa1_conflict = 0,
      n_sa2_conflict = 0, n_credit_stall = 0, n_buf_full = 0, n_single = 0,
      n_multi = 0, n_code_hi = 0;
  bit out_vc_used[P][V];

  function automatic int popcount(input logic [31:0] x);
    int n = 0;
    for (int b = 0; b < 32; b++) n += int'(x[b]);
    return n;
  endfunction

  // one cycle: drive sources and credits, sample, then clock
  task automatic step();
    // sources
    for (int sp = 0; sp < P; sp++) begin
      int cand[$];
      in_valid[sp] = 1'b0; in_type[sp] = '0; in_vc[sp] = '0; in_data[sp] = '0;
      for (int sv = 0; sv < V; sv++) begin
        if (pend[sp][sv].size() == 0 && pkts_left[sp] > 0 && $urandom % 4 == 0) begin
          int len;
          logic [2:0] code;
          len  = ($urandom % 3 == 0) ? 1 : 2 + $urandom % 5;
          code = ($urandom % 100 < hot_pct) ? 3'(4) : 3'($urandom % 8);
          new_packet(sp, sv, len, code);
          pkts_left[sp]--;
        end
        if (pend[sp][sv].size() > 0 && src_cred[sp][sv] > 0) cand.push_back(sv);
      end
      if (cand.size() > 0 && $urandom % 100 < load_pct) begin
        int sv;
        flit_t f;
        sv = cand[$urandom % cand.size()];
        f = pend[sp][sv].pop_front();
        in_valid[sp] = 1'b1;
        in_type[sp]  = f[9:8];
        in_vc[sp]    = 2'(sv);
        in_data[sp]  = f[7:0];
        src_cred[sp][sv]--;
        if (is_head(f[9:8])) begin
          // stamp the send cycle on the first unstamped packet of this VC
          foreach (exp_t0[sp][sv][k]) if (exp_t0[sp][sv][k] < 0) begin
            exp_t0[sp][sv][k] = cycle; break;
          end
          if (f[2:0] > 3'd4) n_code_hi++;
        end
      end
    end
    // sink credits
    for (int op = 0; op < P; op++) begin
      if (sink_hold[op] > 0) sink_hold[op]--;
      else if ($urandom % 200 == 0) sink_hold[op] = 10 + $urandom % 20;
      for (int ov = 0; ov < V; ov++) begin
        credit_in[op][ov] = sink_hold[op] == 0 && sink_pending[op][ov] > 0 && $urandom % 2 == 0;
        if (credit_in[op][ov]) sink_pending[op][ov]--;
      end
    end
    #1;
    // mechanism counters, from the control state of this cycle
    n_va += popcount(32'(dut.u_ctrl.va_grant));
    for (int o = 0; o < P * V; o++) if (popcount(32'(dut.u_ctrl.u_va.va2_req[o])) > 1) n_va2_conflict++;
    for (int i = 0; i < P * V; i++) if (dut.u_ctrl.va_req[i] && !dut.u_ctrl.u_va.va1_any[i]) n_va_stall++;
    for (int ip = 0; ip < P; ip++) if (popcount(32'(dut.u_ctrl.sa_req[ip * V +: V])) > 1) n_sa1_conflict++;
    for (int op = 0; op < P; op++) if (popcount(32'(dut.u_ctrl.u_sa.sa2_req[op])) > 1) n_sa2_conflict++;
    for (int i = 0; i < P * V; i++)
      if (dut.u_ctrl.ivc_active[i] && !dut.vc_empty[i / V][i % V]
          && dut.u_ctrl.ovc_credits[int'(dut.u_ctrl.ivc_port[i]) * V + int'(dut.u_ctrl.ivc_ovc[i])] == 0)
        n_credit_stall++;
    if (|dut.g_in[0].u_port.full || |dut.g_in[1].u_port.full || |dut.g_in[2].u_port.full
        || |dut.g_in[3].u_port.full || |dut.g_in[4].u_port.full) n_buf_full++;
    // sinks: check what is on the output links now
    for (int op = 0; op < P; op++) if (out_valid[op]) begin
      int ov = int'(out_vc[op]);
      flit_t f = {out_type[op], out_data[op]};
      out_vc_used[op][ov] = 1;
      sink_pending[op][ov]++;
      check(sink_pending[op][ov] <= K, "router sent without a credit");
      delivered_flits++;
      if (is_head(out_type[op])) begin
        int sp = int'(out_data[op][5:3]), sv = int'(out_data[op][7:6]);
        check(cur_left[op][ov] == 0, "new header on an output VC inside a packet");
        check(sp < P && expq[sp][sv].size() > 0, "header from no known source");
        if (sp < P && expq[sp][sv].size() > 0) begin
          check(expq[sp][sv][0] == f, "header differs from the expected one");
          check(exp_dst[sp][sv][0] == op, "packet left on the wrong port");
          cur_src_p[op][ov] = sp; cur_src_v[op][ov] = sv;
          cur_left[op][ov] = exp_len[sp][sv][0];
          last_latency = int'(cycle - exp_t0[sp][sv][0]);
          lat_sum += last_latency;
          if (exp_len[sp][sv][0] == 1) n_single++; else n_multi++;
          void'(exp_len[sp][sv].pop_front());
          void'(exp_dst[sp][sv].pop_front());
          void'(exp_t0[sp][sv].pop_front());
        end
      end else begin
        check(cur_left[op][ov] > 0, "body or tail flit outside a packet");
        if (cur_left[op][ov] > 0) begin
          int sp = cur_src_p[op][ov], sv = cur_src_v[op][ov];
          check(expq[sp][sv].size() > 0 && expq[sp][sv][0] == f, "payload flit differs from expected");
        end
      end
      if (cur_left[op][ov] > 0) begin
        int sp = cur_src_p[op][ov], sv = cur_src_v[op][ov];
        if (expq[sp][sv].size() > 0) void'(expq[sp][sv].pop_front());
        cur_left[op][ov]--;
        check((cur_left[op][ov] == 0) == is_tail(out_type[op]), "tail flit not at the packet end");
        if (cur_left[op][ov] == 0) delivered_pkts++;
      end
    end
    // credits returned to the sources
    for (int sp = 0; sp < P; sp++)
      for (int sv = 0; sv < V; sv++) if (credit_out[sp][sv]) begin
        src_cred[sp][sv]++;
        check(src_cred[sp][sv] <= K, "more credits returned than buffer slots");
      end
    @(posedge clk); #1;
    cycle++;
  endtask

  function automatic bit all_idle();
    for (int p = 0; p < P; p++) begin
      if (pkts_left[p] > 0) return 0;
      for (int v = 0; v < V; v++)
        if (pend[p][v].size() > 0 || expq[p][v].size() > 0 || cur_left[p][v] > 0) return 0;
    end
    return 1;
  endfunction

  task automatic drain(input int max_cycles);
    int c = 0;
    while (!all_idle() && c < max_cycles) begin step(); c++; end
    check(all_idle(), "traffic drained");
    // let the last credits come home
    repeat (20) step();
  endtask

  initial begin
    int sent_before, n_pattern = 0;
    rst = 1; in_valid = '0; in_type = '0; in_vc = '0; in_data = '0; credit_in = '0;
    for (int p = 0; p < P; p++) begin
      pkts_left[p] = 0; sink_hold[p] = 0;
      for (int v = 0; v < V; v++) begin
        src_cred[p][v] = K; cur_left[p][v] = 0; sink_pending[p][v] = 0;
      end
    end
    repeat (3) @(posedge clk); #1;
    rst = 0;

    // ---- phase 1: latency with an empty router
    load_pct = 100;
    new_packet(0, 1, 1, 3'd2);                      // single flit, input 0 -> output 2
    step();
    repeat (4) begin
      if (last_latency < 0) step();
    end
    check(last_latency == 3, $sformatf("single-flit latency %0d, expected 3 cycles", last_latency));
    repeat (6) step();
    last_latency = -1;
    new_packet(3, 2, 4, 3'd1);                      // 4 flits, input 3 -> output 1
    begin
      automatic int c0 = delivered_flits;
      automatic longint t_first = -1, t_last = -1;
      for (int c = 0; c < 10; c++) begin
        automatic int n_before = delivered_flits;
        step();
        if (delivered_flits > n_before && t_first < 0) t_first = cycle - 1;
        if (delivered_flits > n_before) t_last = cycle - 1;
      end
      check(delivered_flits - c0 == 4, "4-flit packet delivered");
      check(last_latency == 3, "4-flit header latency 3 cycles");
      check(t_last - t_first == 3, "4-flit packet streams one flit per cycle");
    end
    drain(100);

    // ---- phase 2: rotating routing pattern, single-flit packets
    sent_before = delivered_pkts;
    for (int t = 0; t < 40; t++) begin
      for (int sp = 0; sp < P; sp++) begin
        automatic int sv = t % V;
        if (pend[sp][sv].size() == 0) begin
          new_packet(sp, sv, 1, 3'((sp + t) % P));
          n_pattern++;
        end
      end
      step();
    end
    drain(400);
    check(n_pattern > 30 * P && delivered_pkts - sent_before == n_pattern, "all pattern packets delivered");
    for (int op = 0; op < P; op++) begin
      automatic bit any = 0;
      for (int v = 0; v < V; v++) any |= out_vc_used[op][v];
      check(any, $sformatf("output %0d used by the pattern", op));
    end

    // ---- phase 3: random traffic with a hot spot
    hot_pct = 40; load_pct = 80;
    for (int p = 0; p < P; p++) pkts_left[p] = 300;
    begin
      automatic int c = 0;
      while (!all_idle() && c < 40000) begin step(); c++; end
    end
    drain(2000);

    // ---- mechanisms
    $display("flits %0d packets %0d (single %0d, multi %0d), mean header latency %0.1f cycles",
             delivered_flits, delivered_pkts, n_single, n_multi, real'(lat_sum) / delivered_pkts);
    $display("VA grants %0d, VA2 conflicts %0d, VA stalls (no free VC) %0d", n_va, n_va2_conflict, n_va_stall);
    $display("SA1 conflicts %0d, SA2 conflicts %0d, credit stalls %0d, full input buffer %0d cycles, route codes 5..7 %0d",
             n_sa1_conflict, n_sa2_conflict, n_credit_stall, n_buf_full, n_code_hi);
    check(n_va > 0, "VC allocation happened");
    check(n_va2_conflict > 0, "VA2 conflict happened");
    check(n_va_stall > 0, "VA stall for lack of a free VC happened");
    check(n_sa1_conflict > 0, "SA1 conflict happened");
    check(n_sa2_conflict > 0, "SA2 conflict happened");
    check(n_credit_stall > 0, "credit stall happened");
    check(n_buf_full > 0, "an input VC buffer filled");
    check(n_single > 0 && n_multi > 0, "single and multi-flit packets");
    check(n_code_hi > 0, "route codes 5..7 used");
    for (int op = 0; op < P; op++)
      for (int v = 0; v < V; v++) check(out_vc_used[op][v], "every output VC used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
