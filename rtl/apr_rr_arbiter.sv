// apr_rr_arbiter: round-robin arbiter of the switch.
//
// When several packets want the same output port, the Arbiter picks one.
// The design states only that an arbiter solves such contentions; the
// round-robin policy is this design's own choice. 'req' is sampled
// combinationally and 'gnt' is one-hot (or zero when nothing is requested).
// When 'advance' is high in a cycle with a grant, priority moves to the
// requester after the one granted, so every requester is served within N
// grants.
module apr_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio;   // requester with highest priority
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(prio) + k) % N;
      if (!any && req[idx]) begin
        any      = 1'b1;
        win      = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prio <= '0;
    else if (advance && any) prio <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
