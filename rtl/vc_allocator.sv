// Virtual-channel allocator (VA), two separable arbitration stages.
//
// VA1: one V:1 round-robin arbiter per input VC (P*V of them). An input VC
// holding a header that still needs an output VC requests every free VC of
// its routed output port; VA1 reduces that to a single output VC.
// VA2: one P*V:1 round-robin arbiter per output VC (P*V of them). Each
// collects the input VCs whose VA1 choice is that output VC and grants one.
// An input VC is granted when it wins in VA2; grant_vc then names the output
// VC it received at its routed port. No output VC is granted to two input
// VCs, and only free output VCs are granted.
//
// Timing: combinational from the request inputs to grant; the arbiter
// pointers move on the clock edge where the grant is made (VA1 pointer of a
// granted input VC, VA2 pointer of a granting output VC). The two-stage
// structure and arbiter counts follow the reference design; the pointer
// update policy is this design's choice.
module vc_allocator
  import router_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VCS,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned VW = (V > 1) ? $clog2(V) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [P*V-1:0]           req,
  input  logic [P*V-1:0][PW-1:0]   req_port,
  input  logic [P*V-1:0]           ovc_free,
  output logic [P*V-1:0]           grant,
  output logic [P*V-1:0][VW-1:0]   grant_vc
);

  localparam int unsigned N = P * V;

  // VA1 results
  logic [N-1:0][V-1:0]  va1_req;
  logic [N-1:0][V-1:0]  va1_grant;
  logic [N-1:0][VW-1:0] va1_idx;
  logic [N-1:0]         va1_any;

  // VA2 request matrix: va2_req[output VC][input VC]
  logic [N-1:0][N-1:0]  va2_req;
  logic [N-1:0][N-1:0]  va2_grant;
  logic [N-1:0]         va2_any;

  for (genvar i = 0; i < N; i++) begin : g_va1
    always_comb begin
      for (int unsigned v = 0; v < V; v++) begin
        va1_req[i][v] = req[i] && ovc_free[int'(req_port[i]) * V + v];
      end
    end

    rr_arbiter #(.N(V)) u_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (va1_req[i]),
      .update    (grant[i]),
      .grant     (va1_grant[i]),
      .grant_idx (va1_idx[i]),
      .any_grant (va1_any[i])
    );
  end

  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      for (int unsigned i = 0; i < N; i++) begin
        va2_req[o][i] = va1_any[i] && (int'(req_port[i]) * V + int'(va1_idx[i]) == o);
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_va2
    rr_arbiter #(.N(N)) u_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (va2_req[o]),
      .update    (1'b1),
      .grant     (va2_grant[o]),
      .grant_idx (),
      .any_grant (va2_any[o])
    );
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      grant[i] = 1'b0;
      for (int unsigned o = 0; o < N; o++) begin
        grant[i] = grant[i] | va2_grant[o][i];
      end
      grant_vc[i] = va1_idx[i];
    end
  end

endmodule
