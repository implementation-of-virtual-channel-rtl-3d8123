// Switch allocator (SA), two separable arbitration stages, run every cycle
// for every flit.
//
// SA1: one V:1 round-robin arbiter per input port (P of them). Among the
// port's VCs that are ready to send (output VC held, flit buffered, credit
// available) it picks one, because the port has a single crossbar input.
// SA2: one P:1 round-robin arbiter per output port (P of them). Among the
// input ports whose SA1 winner wants that output it picks one and sets the
// crossbar select for that output.
//
// Outputs: in_grant/in_grant_vc say which VC of each input port sends now
// (output multiplexer control and FIFO pop); out_valid/out_sel are the
// crossbar controls. Combinational from req; an SA1 pointer moves only when
// its winner also wins SA2, an SA2 pointer moves whenever it grants. The
// stage structure and arbiter counts follow the reference design; the
// pointer policy is this design's choice.
module switch_allocator
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
  output logic [P-1:0]             in_grant,
  output logic [P-1:0][VW-1:0]     in_grant_vc,
  output logic [P-1:0]             out_valid,
  output logic [P-1:0][PW-1:0]     out_sel
);

  logic [P-1:0][V-1:0]  sa1_grant;
  logic [P-1:0][VW-1:0] sa1_idx;
  logic [P-1:0]         sa1_any;
  logic [P-1:0][PW-1:0] sa1_port;

  logic [P-1:0][P-1:0]  sa2_req;    // [output][input]
  logic [P-1:0][P-1:0]  sa2_grant;
  logic [P-1:0][PW-1:0] sa2_idx;

  for (genvar ip = 0; ip < P; ip++) begin : g_sa1
    rr_arbiter #(.N(V)) u_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (req[ip*V +: V]),
      .update    (in_grant[ip]),
      .grant     (sa1_grant[ip]),
      .grant_idx (sa1_idx[ip]),
      .any_grant (sa1_any[ip])
    );
    assign sa1_port[ip] = req_port[ip*V + int'(sa1_idx[ip])];
  end

  always_comb begin
    for (int unsigned op = 0; op < P; op++) begin
      for (int unsigned ip = 0; ip < P; ip++) begin
        sa2_req[op][ip] = sa1_any[ip] && (int'(sa1_port[ip]) == op);
      end
    end
  end

  for (genvar op = 0; op < P; op++) begin : g_sa2
    rr_arbiter #(.N(P)) u_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (sa2_req[op]),
      .update    (1'b1),
      .grant     (sa2_grant[op]),
      .grant_idx (sa2_idx[op]),
      .any_grant (out_valid[op])
    );
    assign out_sel[op] = sa2_idx[op];
  end

  always_comb begin
    for (int unsigned ip = 0; ip < P; ip++) begin
      in_grant[ip] = 1'b0;
      for (int unsigned op = 0; op < P; op++) begin
        in_grant[ip] = in_grant[ip] | sa2_grant[op][ip];
      end
      in_grant_vc[ip] = sa1_idx[ip];
    end
  end

endmodule
