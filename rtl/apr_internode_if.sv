// apr_internode_if: InterNode port of the Routing IP.
//
// One physical channel to a neighbouring node, shared by two virtual
// channels (VCs).
//
// Receive side: every flit arriving on 'rx' goes into the buffer of its VC
// (VC_DEPTH flits each). The switch sees the head of each VC buffer as a
// separate input. Each flit the switch pops returns one credit to the
// neighbour on rx_credit[vc].
//
// Transmit side: the switch sends flits tagged with a VC. The port keeps
// one credit counter per VC, equal to the free space in the neighbour's
// buffer of that VC. It starts at VC_DEPTH, drops by one per flit sent and
// rises by one per tx_credit pulse. The switch reads 'tx_space' to admit a
// packet only when its whole length fits (Virtual Cut-Through). Flits are
// registered before they leave, so 'tx' lags the switch by one cycle.
//
// The document gives two VCs per physical channel and VCT switching. The
// credit-based link flow control, the buffer depth and the one-cycle output
// register are this design's choices. The link layer (transceivers) is
// outside this module.
module apr_internode_if
  import apr_pkg::*;
#(
  parameter int unsigned VC_DEPTH = 512,
  localparam int unsigned SW = $clog2(VC_DEPTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // link, receive direction
  input  link_t                    rx,
  output logic [N_VC-1:0]          rx_credit,
  // link, transmit direction
  output link_t                    tx,
  input  logic [N_VC-1:0]          tx_credit,
  // switch side, flits received (one head per VC)
  output logic [N_VC-1:0]          in_valid,
  output flit_t [N_VC-1:0]         in_flit,
  input  logic [N_VC-1:0]          in_pop,
  // switch side, flits to send
  input  logic                     out_valid,
  input  logic                     out_vc,
  input  flit_t                    out_flit,
  output logic [N_VC-1:0][SW-1:0]  tx_space
);
  logic [N_VC-1:0][SW-1:0] credits;

  for (genvar v = 0; v < N_VC; v++) begin : g_vc
    logic empty;
    logic [SW-1:0] cnt, fr;
    logic [$bits(flit_t)-1:0] head;

    apr_fifo #(.W($bits(flit_t)), .DEPTH(VC_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (rx.valid && rx.vc == 1'(v)),
      .wr_data(rx.flit),
      .rd_en  (in_pop[v]),
      .rd_data(head),
      .empty  (empty),
      .full   (),
      .count  (cnt),
      .free   (fr)
    );
    assign in_valid[v] = !empty;
    assign in_flit[v]  = flit_t'(head);

    always_ff @(posedge clk) begin
      if (!rst_n) rx_credit[v] <= 1'b0;
      else        rx_credit[v] <= in_pop[v] && !empty;
    end

    logic sent;
    assign sent = out_valid && out_vc == 1'(v);
    always_ff @(posedge clk) begin
      if (!rst_n) credits[v] <= SW'(VC_DEPTH);
      else        credits[v] <= credits[v] - SW'(sent) + SW'(tx_credit[v]);
    end
    assign tx_space[v] = credits[v];

    a_credit: assert property (@(posedge clk) disable iff (!rst_n) sent |-> credits[v] != '0);
    a_rxfit:  assert property (@(posedge clk) disable iff (!rst_n)
                               (rx.valid && rx.vc == 1'(v)) |-> fr != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx <= '0;
    end else begin
      tx.valid <= out_valid;
      tx.vc    <= out_vc;
      tx.flit  <= out_flit;
    end
  end
endmodule
