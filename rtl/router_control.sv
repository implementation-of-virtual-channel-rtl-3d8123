// Router control logic: routing computation, VC allocation and switch
// allocation, plus the per-VC state they act on.
//
// Input VC state (P*V entries): idle or active, and while active the output
// port and output VC held by the packet. An idle VC whose front flit is a
// header is routed (route_compute on the header's data) and requests the VC
// allocator; on a grant it becomes active. An active VC with a buffered flit
// and at least one credit for its output VC requests the switch allocator.
// When a tail flit wins the switch, the input VC goes idle again and its
// output VC is released. RC and VA are thus done once per packet, SA once
// per flit.
//
// Output VC state (P*V entries): an allocated flag and a credit counter
// that counts free slots in the downstream VC buffer. It starts at K, drops
// by one for each flit sent and rises by one for each credit_in pulse.
//
// Timing: a header that reaches the front of its FIFO is allocated an output
// VC at the next clock edge and can win the switch from the edge after that;
// pop, sel_vc, send_vc and the crossbar controls are combinational in the
// cycle the flit is switched. The three units and their roles follow the
// reference design; the state encoding and the credit counters are this
// design's choices.
module router_control
  import router_pkg::*;
#(
  parameter int unsigned P      = NUM_PORTS,
  parameter int unsigned V      = NUM_VCS,
  parameter int unsigned K      = VC_DEPTH,
  parameter int unsigned DATA_W = FLIT_DATA_W,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned VW = (V > 1) ? $clog2(V) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  // input VC buffers
  input  logic [P-1:0][V-1:0]           vc_empty,
  input  logic [P-1:0][V-1:0][1:0]      front_type,
  input  logic [P-1:0][V-1:0][DATA_W-1:0] front_data,
  output logic [P-1:0][V-1:0]           pop,
  output logic [P-1:0][VW-1:0]          sel_vc,
  output logic [P-1:0][VW-1:0]          send_vc,
  // crossbar
  output logic [P-1:0]                  xbar_en,
  output logic [P-1:0][PW-1:0]          xbar_sel,
  // downstream credits, one per output VC
  input  logic [P-1:0][V-1:0]           credit_in
);

  localparam int unsigned N = P * V;

  // input VC state
  logic [N-1:0]          ivc_active;
  logic [N-1:0][PW-1:0]  ivc_port;
  logic [N-1:0][VW-1:0]  ivc_ovc;

  // output VC state
  logic [N-1:0]          ovc_busy;
  logic [N-1:0][CW-1:0]  ovc_credits;

  // RC, VA and SA signals
  logic [N-1:0][PW-1:0]  rc_port;
  logic [N-1:0]          va_req, va_grant;
  logic [N-1:0][PW-1:0]  va_port;
  logic [N-1:0][VW-1:0]  va_vc;
  logic [N-1:0]          sa_req;
  logic [P-1:0]          sa_in_grant;
  logic [P-1:0][VW-1:0]  sa_in_vc;
  logic [N-1:0]          send;       // input VC sends a flit this cycle
  logic [N-1:0]          ovc_dec;    // output VC receives a flit this cycle
  logic [N-1:0]          ovc_release;

  for (genvar i = 0; i < N; i++) begin : g_ivc
    localparam int unsigned IP = i / V;
    localparam int unsigned IV = i % V;

    route_compute #(.P(P), .DATA_W(DATA_W)) u_rc (
      .head_data (front_data[IP][IV]),
      .out_port  (rc_port[i])
    );

    assign va_req[i]  = !ivc_active[i] && !vc_empty[IP][IV] && is_head(front_type[IP][IV]);
    assign va_port[i] = rc_port[i];
    assign sa_req[i]  = ivc_active[i] && !vc_empty[IP][IV]
                        && (ovc_credits[int'(ivc_port[i]) * V + int'(ivc_ovc[i])] != 0);
    assign send[i]    = sa_in_grant[IP] && (int'(sa_in_vc[IP]) == IV);
    assign pop[IP][IV] = send[i];
  end

  vc_allocator #(.P(P), .V(V)) u_va (
    .clk      (clk),
    .rst      (rst),
    .req      (va_req),
    .req_port (va_port),
    .ovc_free (~ovc_busy),
    .grant    (va_grant),
    .grant_vc (va_vc)
  );

  switch_allocator #(.P(P), .V(V)) u_sa (
    .clk         (clk),
    .rst         (rst),
    .req         (sa_req),
    .req_port    (ivc_port),
    .in_grant    (sa_in_grant),
    .in_grant_vc (sa_in_vc),
    .out_valid   (xbar_en),
    .out_sel     (xbar_sel)
  );

  for (genvar ip = 0; ip < P; ip++) begin : g_port
    assign sel_vc[ip]  = sa_in_vc[ip];
    assign send_vc[ip] = ivc_ovc[ip * V + int'(sa_in_vc[ip])];
  end

  // which output VCs receive a flit / a tail this cycle
  always_comb begin
    ovc_dec     = '0;
    ovc_release = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (send[i]) begin
        ovc_dec[int'(ivc_port[i]) * V + int'(ivc_ovc[i])] = 1'b1;
        if (is_tail(front_type[i / V][i % V]))
          ovc_release[int'(ivc_port[i]) * V + int'(ivc_ovc[i])] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ivc_active <= '0;
      ivc_port   <= '0;
      ivc_ovc    <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (va_grant[i]) begin
          ivc_active[i] <= 1'b1;
          ivc_port[i]   <= va_port[i];
          ivc_ovc[i]    <= va_vc[i];
        end else if (send[i] && is_tail(front_type[i / V][i % V])) begin
          ivc_active[i] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ovc_busy    <= '0;
      ovc_credits <= {N{CW'(K)}};
    end else begin
      for (int unsigned o = 0; o < N; o++) begin
        if (ovc_release[o]) ovc_busy[o] <= 1'b0;
        for (int unsigned i = 0; i < N; i++) begin
          if (va_grant[i] && int'(va_port[i]) * V + int'(va_vc[i]) == o)
            ovc_busy[o] <= 1'b1;
        end
        ovc_credits[o] <= ovc_credits[o] - CW'(ovc_dec[o]) + CW'(credit_in[o / V][o % V]);
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    // an idle VC must see a header first: body or tail flits without a head
    // break the wormhole protocol
    assert property (@(posedge clk) disable iff (rst)
      (!ivc_active[i] && !vc_empty[i / V][i % V]) |-> is_head(front_type[i / V][i % V]))
      else $error("input VC %0d: packet does not start with a header", i);
    assert property (@(posedge clk) disable iff (rst)
      int'(ovc_credits[i]) + int'(credit_in[i / V][i % V]) <= K)
      else $error("output VC %0d: more credits returned than buffer slots", i);
  end

endmodule
