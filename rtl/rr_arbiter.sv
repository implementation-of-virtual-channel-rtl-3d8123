// Round-robin arbiter, N requesters, one-hot grant.
//
// The requester at the priority pointer is served first, then the ones
// after it in circular order. The grant is combinational from req. The
// pointer moves to the requester just after the winner on a clock edge where
// `update` is high, so a requester that wins and uses its grant drops to the
// lowest priority, while one whose grant goes unused keeps its place. This is
// the fair arbiter used in every stage of VC and switch allocation.
// Reset (synchronous, active high) gives requester 0 the top priority.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  req,
  input  logic          update,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx,
  output logic          any_grant
);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any_grant = 1'b0;
    for (int unsigned off = 0; off < N; off++) begin
      int unsigned idx;
      idx = (int'(ptr) + off) % N;
      if (!any_grant && req[idx]) begin
        any_grant  = 1'b1;
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (update && any_grant) begin
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
