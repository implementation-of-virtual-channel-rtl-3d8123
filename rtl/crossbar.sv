// P x P crossbar with registered outputs (switch traversal).
//
// Each output channel takes the flit of the input port named by out_sel
// when out_en is set; the switch allocator guarantees that an input port
// feeds at most one output per cycle. Every input port owns exactly one
// crossbar input, whatever the number of VCs behind it, which keeps the
// crossbar P x P as in the reference design. The flit is registered on the
// output link: it appears, with out_valid, right after the clock edge at
// which it was switched. The output register is this design's choice.
module crossbar #(
  parameter int unsigned P = 5,
  parameter int unsigned W = 12,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [P-1:0][W-1:0]  in_flit,
  input  logic [P-1:0][PW-1:0] out_sel,
  input  logic [P-1:0]         out_en,
  output logic [P-1:0]         out_valid,
  output logic [P-1:0][W-1:0]  out_flit
);

  for (genvar op = 0; op < P; op++) begin : g_out
    always_ff @(posedge clk) begin
      if (rst) begin
        out_valid[op] <= 1'b0;
        out_flit[op]  <= '0;
      end else begin
        out_valid[op] <= out_en[op];
        if (out_en[op]) out_flit[op] <= in_flit[out_sel[op]];
      end
    end
  end

endmodule
