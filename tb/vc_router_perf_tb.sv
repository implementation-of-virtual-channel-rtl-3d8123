// Load test of vc_router at its default size: average packet latency and
// accepted throughput under uniform random traffic.
//
// Each of the five sources generates 4-flit packets (Bernoulli process, an
// offered load given in flits per cycle per port) for uniformly chosen
// output ports, queues them without limit, and puts each packet on a free
// VC of its link; flits of different VCs are interleaved and obey credits.
// Sinks accept every flit and return its credit in the next cycle.
// Latency runs from the cycle a packet is generated to the cycle its tail
// leaves the router; throughput is the delivered flits per output port per
// cycle, in percent. For each load the run warms up, measures, then drains.
// Checks: every packet arrives complete, on its routed port, with its flits
// in order; below saturation (10 % and 20 %) the accepted throughput equals
// the offered load within 3 points; no packet is faster than the 3-cycle
// pipeline plus its 3 trailing flits; throughput never falls as load rises.
module vc_router_perf_tb;
  import router_pkg::*;
  localparam int unsigned P = 5, V = 4, K = 4, DATA_W = 8, LEN = 4;
  localparam int WARMUP = 500, WINDOW = 3000;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packets are numbered per source; a header carries {seq[1:0], src, code}
  int     srcq_dst[P][$];          // generated, not yet on a VC
  longint srcq_t0[P][$];
  int     vc_flits[P][V];          // flits of the current packet still to send
  int     vc_dst[P][V];
  int     src_cred[P][V];
  int     exp_dst[P][V][$];        // packets in flight per source VC
  longint exp_t0[P][V][$];
  int     cur_left[P][V], cur_sp[P][V], cur_sv[P][V];
  longint cur_t0[P][V];
  logic [P-1:0][V-1:0] credit_next;
  bit     generating;
  int     load_pm;                 // offered load, flits per 1000 cycles per port
  bit     measuring;
  longint win_flits, lat_sum, lat_n, lat_min;

  task automatic step();
    for (int sp = 0; sp < P; sp++) begin
      automatic int cand[$];
      // generation
      if (generating && ($urandom % (1000 * LEN)) < load_pm) begin
        srcq_dst[sp].push_back($urandom % P);
        srcq_t0[sp].push_back(cycle);
      end
      // put the oldest queued packet on a free VC
      for (int sv = 0; sv < V; sv++)
        if (srcq_dst[sp].size() > 0 && vc_flits[sp][sv] == 0) begin
          vc_flits[sp][sv] = LEN;
          vc_dst[sp][sv] = srcq_dst[sp].pop_front();
          exp_dst[sp][sv].push_back(vc_dst[sp][sv]);
          exp_t0[sp][sv].push_back(srcq_t0[sp].pop_front());
        end
      in_valid[sp] = 0; in_type[sp] = '0; in_vc[sp] = '0; in_data[sp] = '0;
      for (int sv = 0; sv < V; sv++)
        if (vc_flits[sp][sv] > 0 && src_cred[sp][sv] > 0) cand.push_back(sv);
      if (cand.size() > 0) begin
        automatic int sv = cand[$urandom % cand.size()];
        automatic int k = LEN - vc_flits[sp][sv];
        in_valid[sp] = 1;
        in_vc[sp]    = 2'(sv);
        in_type[sp]  = (k == 0) ? FLIT_HEAD : (k == LEN - 1) ? FLIT_TAIL : FLIT_BODY;
        in_data[sp]  = (k == 0) ? {2'(sv), 3'(sp), 3'(vc_dst[sp][sv])} : 8'(k);
        vc_flits[sp][sv]--;
        src_cred[sp][sv]--;
      end
    end
    credit_in = credit_next;
    credit_next = '0;
    #1;
    for (int op = 0; op < P; op++) if (out_valid[op]) begin
      automatic int ov = int'(out_vc[op]);
      credit_next[op][ov] = 1'b1;
      if (measuring) win_flits++;
      if (is_head(out_type[op])) begin
        automatic int sp = int'(out_data[op][5:3]), sv = int'(out_data[op][7:6]);
        check(cur_left[op][ov] == 0 && sp < P && exp_dst[sp][sv].size() > 0, "header without a packet");
        if (sp < P && exp_dst[sp][sv].size() > 0) begin
          check(exp_dst[sp][sv][0] == op, "packet on the wrong output port");
          cur_t0[op][ov] = exp_t0[sp][sv][0];
          void'(exp_dst[sp][sv].pop_front());
          void'(exp_t0[sp][sv].pop_front());
        end
        cur_left[op][ov] = LEN - 1;
        cur_sp[op][ov] = sp; cur_sv[op][ov] = sv;
      end else begin
        check(cur_left[op][ov] > 0 && int'(out_data[op]) == LEN - cur_left[op][ov],
              "payload flit out of order");
        cur_left[op][ov]--;
        if (cur_left[op][ov] == 0) begin
          automatic longint lat = cycle - cur_t0[op][ov];
          check(out_type[op] == FLIT_TAIL, "packet does not end with its tail");
          lat_sum += lat; lat_n++;
          if (lat < lat_min) lat_min = lat;
        end
      end
    end
    for (int sp = 0; sp < P; sp++)
      for (int sv = 0; sv < V; sv++) if (credit_out[sp][sv]) src_cred[sp][sv]++;
    @(posedge clk); #1;
    cycle++;
  endtask

  function automatic bit idle();
    for (int p = 0; p < P; p++) begin
      if (srcq_dst[p].size() > 0) return 0;
      for (int v = 0; v < V; v++)
        if (vc_flits[p][v] > 0 || exp_dst[p][v].size() > 0 || cur_left[p][v] > 0) return 0;
    end
    return 1;
  endfunction

  initial begin
    int loads[5] = '{100, 200, 400, 600, 800};
    real thr[5], lat[5];
    rst = 1; in_valid = '0; in_type = '0; in_vc = '0; in_data = '0; credit_in = '0;
    credit_next = '0; generating = 0; measuring = 0;
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        src_cred[p][v] = K; vc_flits[p][v] = 0; cur_left[p][v] = 0;
      end
    repeat (3) @(posedge clk); #1;
    rst = 0;
    $display("offered %%  accepted %%  avg latency (cycles)");
    for (int l = 0; l < 5; l++) begin
      automatic int guard = 0;
      load_pm = loads[l];
      win_flits = 0; lat_sum = 0; lat_n = 0; lat_min = 1 << 30;
      generating = 1;
      repeat (WARMUP) step();
      measuring = 1;
      repeat (WINDOW) step();
      measuring = 0;
      generating = 0;
      while (!idle() && guard < 50000) begin step(); guard++; end
      check(idle(), "all packets delivered");
      repeat (5) step();
      thr[l] = 100.0 * real'(win_flits) / real'(P * WINDOW);
      lat[l] = real'(lat_sum) / real'(lat_n);
      $display("%8.1f  %10.2f  %12.1f", loads[l] / 10.0, thr[l], lat[l]);
      check(lat_min >= 3 + LEN - 1, "latency below the pipeline minimum");
      if (l < 2) check(thr[l] > loads[l] / 10.0 - 3.0 && thr[l] < loads[l] / 10.0 + 3.0,
                       "accepted throughput follows offered load below saturation");
      if (l > 0) check(thr[l] >= thr[l - 1] - 2.0, "throughput does not fall with load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
