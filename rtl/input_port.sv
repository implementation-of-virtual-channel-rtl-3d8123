// Input port with static virtual-channel buffers.
//
// The physical input channel is split into V virtual channels. An input
// demultiplexer, steered by the VC identifier that travels with each flit,
// writes the flit into that VC's own K-flit FIFO. The FIFOs are merged again
// by an output multiplexer controlled by the switch allocator (sel_vc), so the
// whole port shares a single crossbar input. Each VC's front flit and its
// empty flag go to the router control for routing and allocation.
//
// Timing: a flit present with in_valid at a clock edge is stored at that
// edge and is visible at the front of its FIFO right after it. A pop[v] at a
// clock edge removes the front flit of VC v, and credit_out[v] is high for
// the clock cycle after that edge: one credit per freed buffer slot, for the
// upstream router. The buffer organisation follows the reference design; the credit
// return and the separate VC identifier field are this design's choices.
module input_port
  import router_pkg::*;
#(
  parameter int unsigned V      = NUM_VCS,
  parameter int unsigned K      = VC_DEPTH,
  parameter int unsigned DATA_W = FLIT_DATA_W,
  localparam int unsigned VW = (V > 1) ? $clog2(V) : 1
) (
  input  logic                   clk,
  input  logic                   rst,
  // input channel
  input  logic                   in_valid,
  input  logic [1:0]             in_type,
  input  logic [VW-1:0]          in_vc,
  input  logic [DATA_W-1:0]      in_data,
  output logic [V-1:0]           credit_out,
  // towards router control
  input  logic [V-1:0]           pop,
  input  logic [VW-1:0]          sel_vc,
  output logic [V-1:0]           vc_empty,
  output logic [V-1:0][1:0]      front_type,
  output logic [V-1:0][DATA_W-1:0] front_data,
  // towards crossbar
  output logic [1:0]             out_type,
  output logic [DATA_W-1:0]      out_data
);

  localparam int unsigned FW = DATA_W + 2;

  logic [V-1:0] push;
  logic [V-1:0] full;

  for (genvar v = 0; v < V; v++) begin : g_vc
    logic [FW-1:0] front;

    // input demultiplexer
    assign push[v] = in_valid && (int'(in_vc) == v);

    vc_fifo #(.WIDTH(FW), .DEPTH(K)) u_fifo (
      .clk   (clk),
      .rst   (rst),
      .push  (push[v]),
      .din   ({in_type, in_data}),
      .pop   (pop[v]),
      .dout  (front),
      .empty (vc_empty[v]),
      .full  (full[v]),
      .count ()
    );

    assign front_type[v] = front[FW-1 -: 2];
    assign front_data[v] = front[DATA_W-1:0];
  end

  // output multiplexer under switch-allocator control
  assign out_type = front_type[sel_vc];
  assign out_data = front_data[sel_vc];

  always_ff @(posedge clk) begin
    if (rst) credit_out <= '0;
    else     credit_out <= pop & ~vc_empty;
  end

  assert property (@(posedge clk) disable iff (rst) !(|(push & full)))
    else $error("flit arrived for a full VC buffer: upstream ignored credits");
  assert property (@(posedge clk) disable iff (rst) $onehot0(pop));

endmodule
