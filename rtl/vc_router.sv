// Five-port virtual-channel wormhole router (top level).
//
// Each of the P input channels (north, south, west, east, local) ends in an
// input port that sorts flits by their VC identifier into V separate K-flit
// FIFOs. The router control routes each packet's header by its three low
// data bits (code c goes to output c), allocates an output VC in two
// arbitration stages (VA1, VA2), and every cycle allocates the crossbar in
// two more (SA1, SA2). The winners cross a P x P crossbar, one flit per
// input port and per output port, and leave on registered output links
// carrying the newly allocated output VC identifier. Flow control is by
// credits: the router returns one credit_out pulse per flit leaving an input
// VC buffer and consumes credit_in pulses from the downstream buffers, each
// output VC starting with K credits.
//
// Timing (no contention): a header sampled on in_* at clock edge n is in its
// FIFO after edge n, gets an output VC at edge n+1 and appears on out_* after
// edge n+2. Each following flit of the packet appears one cycle after the
// previous one when the input keeps up. Reset is synchronous, active high.
//
// Port count, 8-bit data, the VC buffer, the two-stage allocators with
// round-robin arbiters and the shared crossbar input per port follow the
// reference router. V = 4, K = 4, the flit type and VC identifier fields, the
// credit flow control and the pipeline timing are this design's choices.
module vc_router
  import router_pkg::*;
#(
  parameter int unsigned P      = NUM_PORTS,
  parameter int unsigned V      = NUM_VCS,
  parameter int unsigned K      = VC_DEPTH,
  parameter int unsigned DATA_W = FLIT_DATA_W,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned VW = (V > 1) ? $clog2(V) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  // input channels
  input  logic [P-1:0]             in_valid,
  input  logic [P-1:0][1:0]        in_type,
  input  logic [P-1:0][VW-1:0]     in_vc,
  input  logic [P-1:0][DATA_W-1:0] in_data,
  output logic [P-1:0][V-1:0]      credit_out,
  // output channels
  output logic [P-1:0]             out_valid,
  output logic [P-1:0][1:0]        out_type,
  output logic [P-1:0][VW-1:0]     out_vc,
  output logic [P-1:0][DATA_W-1:0] out_data,
  input  logic [P-1:0][V-1:0]      credit_in
);

  localparam int unsigned FW = 2 + VW + DATA_W;

  logic [P-1:0][V-1:0]             pop;
  logic [P-1:0][VW-1:0]            sel_vc, send_vc;
  logic [P-1:0][V-1:0]             vc_empty;
  logic [P-1:0][V-1:0][1:0]        front_type;
  logic [P-1:0][V-1:0][DATA_W-1:0] front_data;
  logic [P-1:0][1:0]               port_type;
  logic [P-1:0][DATA_W-1:0]        port_data;
  logic [P-1:0]                    xbar_en;
  logic [P-1:0][PW-1:0]            xbar_sel;
  logic [P-1:0][FW-1:0]            xbar_in, xbar_out;

  for (genvar ip = 0; ip < P; ip++) begin : g_in
    input_port #(.V(V), .K(K), .DATA_W(DATA_W)) u_port (
      .clk        (clk),
      .rst        (rst),
      .in_valid   (in_valid[ip]),
      .in_type    (in_type[ip]),
      .in_vc      (in_vc[ip]),
      .in_data    (in_data[ip]),
      .credit_out (credit_out[ip]),
      .pop        (pop[ip]),
      .sel_vc     (sel_vc[ip]),
      .vc_empty   (vc_empty[ip]),
      .front_type (front_type[ip]),
      .front_data (front_data[ip]),
      .out_type   (port_type[ip]),
      .out_data   (port_data[ip])
    );
    // the flit crosses the switch carrying its new output VC identifier
    assign xbar_in[ip] = {port_type[ip], send_vc[ip], port_data[ip]};
  end

  router_control #(.P(P), .V(V), .K(K), .DATA_W(DATA_W)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .vc_empty   (vc_empty),
    .front_type (front_type),
    .front_data (front_data),
    .pop        (pop),
    .sel_vc     (sel_vc),
    .send_vc    (send_vc),
    .xbar_en    (xbar_en),
    .xbar_sel   (xbar_sel),
    .credit_in  (credit_in)
  );

  crossbar #(.P(P), .W(FW)) u_xbar (
    .clk       (clk),
    .rst       (rst),
    .in_flit   (xbar_in),
    .out_sel   (xbar_sel),
    .out_en    (xbar_en),
    .out_valid (out_valid),
    .out_flit  (xbar_out)
  );

  for (genvar op = 0; op < P; op++) begin : g_out
    assign out_type[op] = xbar_out[op][FW-1 -: 2];
    assign out_vc[op]   = xbar_out[op][DATA_W +: VW];
    assign out_data[op] = xbar_out[op][DATA_W-1:0];
  end

endmodule
