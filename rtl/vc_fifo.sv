// Flit buffer of one virtual channel: a K-deep first-in first-out queue.
//
// A circular array with a write pointer (the slot selected by the buffer's
// input demultiplexer) and a read pointer (the slot selected by its output
// multiplexer). The front flit is always visible on dout (first-word
// fall-through), so the router control can read a header before deciding to
// pop it. A push and a pop may happen on the same clock edge. The status
// outputs (empty, full, count) are the FIFO status kept for each VC.
// Pushing into a full FIFO is a protocol error: the credit scheme upstream
// must prevent it, and an assertion flags it.
module vc_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (int'(count) == DEPTH);
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full) wptr <= next_ptr(wptr);
      if (pop && !empty) rptr <= next_ptr(rptr);
      case ({push && !full, pop && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && full));
  assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
