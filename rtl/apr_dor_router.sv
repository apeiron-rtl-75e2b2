// apr_dor_router: route computation of the switch (the "Router").
//
// Combinational. From the destination in a packet header, the node's own
// coordinate and the port and virtual channel (VC) the packet arrived on, it
// picks the output port and the output VC.
//
// Routing is dimension-order (DOR) on an N_DIMS-dimensional torus of
// DIM_SIZE nodes per dimension: the offset in one dimension is reduced to
// zero before the next dimension is considered. The dimensions are taken in
// anti-lexicographic order, read here as highest-numbered dimension first.
// Within a dimension the packet takes the shorter way round the ring (plus
// on a tie). When every offset is zero the packet leaves on IntraNode port
// dst_task; a task number with no IntraNode port sets 'drop'.
//
// Deadlock freedom on the rings uses the two VCs of each link. The document
// states only that two VCs per physical channel are used; the dateline rule
// is this design's choice: a packet entering a dimension starts on VC0, keeps
// its VC while it continues in the same direction, and moves to VC1 when it
// takes the wrap-around link (plus from DIM_SIZE-1, minus from 0).
//
// Port numbering: 0..N_INTRA-1 are IntraNode ports, N_INTRA+2d is the plus
// link and N_INTRA+2d+1 the minus link of dimension d.
module apr_dor_router
  import apr_pkg::*;
#(
  parameter int unsigned N_DIMS   = 1,
  parameter int unsigned DIM_SIZE = 4,
  parameter int unsigned N_INTRA  = 2,
  localparam int unsigned N_PORTS = N_INTRA + 2 * N_DIMS,
  localparam int unsigned PW      = $clog2(N_PORTS)
) (
  input  coord_t            my_coord,
  input  coord_t            dst_coord,
  input  logic [TASK_W-1:0] dst_task,
  input  logic              in_is_link,  // arrived on an InterNode port
  input  logic [PW-1:0]     in_port,     // port it arrived on
  input  logic              in_vc,       // VC it arrived on
  output logic [PW-1:0]     out_port,
  output logic              out_vc,
  output logic              drop
);
  always_comb begin
    logic        found, minus, wrap, cont;
    int unsigned off, cur;
    found    = 1'b0;
    minus    = 1'b0;
    wrap     = 1'b0;
    cont     = 1'b0;
    off      = 0;
    cur      = 0;
    out_port = PW'(dst_task);
    out_vc   = 1'b0;
    drop     = (int'(dst_task) >= N_INTRA);
    for (int d = N_DIMS - 1; d >= 0; d--) begin
      if (!found && dst_coord[d] != my_coord[d]) begin
        found = 1'b1;
        drop  = 1'b0;
        cur   = int'(my_coord[d]);
        off   = (int'(dst_coord[d]) + DIM_SIZE - cur) % DIM_SIZE;
        minus = (2 * off > DIM_SIZE);
        out_port = PW'(N_INTRA + 2 * d + int'(minus));
        // continuing straight on: came in on the opposite link of this dimension
        cont = in_is_link && (int'(in_port) == N_INTRA + 2 * d + int'(!minus));
        wrap = minus ? (cur == 0) : (cur == DIM_SIZE - 1);
        out_vc = (cont ? in_vc : 1'b0) | wrap;
      end
    end
  end
endmodule
