// Routing computation for one header flit.
//
// The low three bits of a header's data are the select lines of the output
// demultiplexer: code 0 goes to the first output (dout1), code 1 to the
// second, and so on up to code 4 for the fifth. Codes that name no port
// (5, 6, 7 with five ports) are delivered to the last port, the local
// processing element. The decoding follows the reference router; the
// handling of unused codes is this design's choice. Purely combinational;
// every VC of the chosen output port is allowed.
module route_compute
  import router_pkg::*;
#(
  parameter int unsigned P      = NUM_PORTS,
  parameter int unsigned DATA_W = FLIT_DATA_W,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [DATA_W-1:0] head_data,
  output logic [PW-1:0]     out_port
);

  logic [ROUTE_BITS-1:0] code;

  assign code = head_data[ROUTE_BITS-1:0];

  always_comb begin
    if (int'(code) < P) out_port = PW'(code);
    else                out_port = PW'(P - 1);
  end

endmodule
