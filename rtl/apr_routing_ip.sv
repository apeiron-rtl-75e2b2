// apr_routing_ip: Routing IP of the Communication IP.
//
// Joins the four parts the framework gives the Routing IP:
//  - N_INTRA IntraNode interfaces (apr_intranode_if), one per HLS task, with
//    header/data FIFOs in each direction;
//  - 2*N_DIMS InterNode interfaces (apr_internode_if), a plus and a minus
//    link per torus dimension, each with two virtual-channel buffers and
//    credit flow control;
//  - the Switch with its Router and Arbiter (apr_switch), Virtual
//    Cut-Through;
//  - the Configuration/Status registers (apr_csr), which hold the node's
//    coordinate and the enable bit and count packets, drops and footer
//    errors.
// Link l is the plus link of dimension l/2 when l is even, the minus link
// when odd. In a torus the plus link of one node connects to the minus link
// of its neighbour. Timing: a packet's header leaves on a link or reaches
// the task-side FIFOs a few cycles after it is available at an input (see
// the README), then one flit per cycle follows.
module apr_routing_ip
  import apr_pkg::*;
#(
  parameter int unsigned N_DIMS     = 1,
  parameter int unsigned DIM_SIZE   = 4,
  parameter int unsigned N_INTRA    = 2,
  parameter int unsigned VC_DEPTH   = 512,
  parameter int unsigned HDR_DEPTH  = 8,
  parameter int unsigned DATA_DEPTH = 512,
  localparam int unsigned N_LINK    = 2 * N_DIMS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // host register port
  input  logic [7:0]                      cfg_addr,
  input  logic                            cfg_wr,
  input  logic [31:0]                     cfg_wdata,
  output logic [31:0]                     cfg_rdata,
  output coord_t                          my_coord,
  // IntraNode ports, outgoing (Aggregator side)
  input  logic    [N_INTRA-1:0]           ohdr_wr,
  input  header_t [N_INTRA-1:0]           ohdr_data,
  output logic    [N_INTRA-1:0]           ohdr_full,
  input  logic    [N_INTRA-1:0]           odat_wr,
  input  logic    [N_INTRA-1:0][FLIT_W-1:0] odat_data,
  output logic    [N_INTRA-1:0]           odat_full,
  // IntraNode ports, incoming (Dispatcher side)
  input  logic    [N_INTRA-1:0]           ihdr_rd,
  output header_t [N_INTRA-1:0]           ihdr_data,
  output logic    [N_INTRA-1:0]           ihdr_empty,
  input  logic    [N_INTRA-1:0]           idat_rd,
  output logic    [N_INTRA-1:0][FLIT_W-1:0] idat_data,
  output logic    [N_INTRA-1:0]           idat_empty,
  // InterNode links
  input  link_t   [N_LINK-1:0]            rx,
  output logic    [N_LINK-1:0][N_VC-1:0]  rx_credit,
  output link_t   [N_LINK-1:0]            tx,
  input  logic    [N_LINK-1:0][N_VC-1:0]  tx_credit
);
  localparam int unsigned N_PORTS = N_INTRA + N_LINK;
  localparam int unsigned N_REQ   = N_INTRA + N_VC * N_LINK;
  localparam int unsigned SPACE_W = $clog2(((VC_DEPTH > DATA_DEPTH + 2) ? VC_DEPTH : DATA_DEPTH + 2) + 1);

  // A packet is admitted only when it fits whole in the buffer ahead, and
  // the Aggregator writes a whole packet before its header: both buffers
  // must hold the largest packet.
  if (VC_DEPTH < MAX_LEN + 2 || DATA_DEPTH < MAX_LEN) begin : g_depth_check
    $error("VC_DEPTH must be at least MAX_LEN+2 and DATA_DEPTH at least MAX_LEN");
  end

  logic                                   enable, drop;
  logic  [N_REQ-1:0]                      in_valid, in_pop;
  flit_t [N_REQ-1:0]                      in_flit;
  logic  [N_PORTS-1:0]                    out_valid, out_vc, out_pkt;
  flit_t [N_PORTS-1:0]                    out_flit;
  logic  [N_PORTS-1:0][N_VC-1:0][SPACE_W-1:0] out_space;
  logic  [N_INTRA-1:0]                    csum_err;

  for (genvar i = 0; i < N_INTRA; i++) begin : g_intra
    logic [$clog2(DATA_DEPTH + 3)-1:0] sp;
    apr_intranode_if #(.HDR_DEPTH(HDR_DEPTH), .DATA_DEPTH(DATA_DEPTH)) u_if (
      .clk, .rst_n,
      .ohdr_wr  (ohdr_wr[i]),   .ohdr_data(ohdr_data[i]), .ohdr_full (ohdr_full[i]),
      .odat_wr  (odat_wr[i]),   .odat_data(odat_data[i]), .odat_full (odat_full[i]),
      .ihdr_rd  (ihdr_rd[i]),   .ihdr_data(ihdr_data[i]), .ihdr_empty(ihdr_empty[i]),
      .idat_rd  (idat_rd[i]),   .idat_data(idat_data[i]), .idat_empty(idat_empty[i]),
      .inj_valid(in_valid[i]),  .inj_flit (in_flit[i]),   .inj_ready (in_pop[i]),
      .ej_valid (out_valid[i]), .ej_flit  (out_flit[i]),  .ej_space  (sp),
      .csum_err (csum_err[i])
    );
    for (genvar v = 0; v < N_VC; v++) begin : g_sp
      assign out_space[i][v] = SPACE_W'(sp);
    end
  end

  for (genvar l = 0; l < N_LINK; l++) begin : g_link
    localparam int unsigned R0 = N_INTRA + N_VC * l;
    logic [N_VC-1:0][$clog2(VC_DEPTH + 1)-1:0] sp;
    apr_internode_if #(.VC_DEPTH(VC_DEPTH)) u_if (
      .clk, .rst_n,
      .rx       (rx[l]),
      .rx_credit(rx_credit[l]),
      .tx       (tx[l]),
      .tx_credit(tx_credit[l]),
      .in_valid (in_valid[R0 +: N_VC]),
      .in_flit  (in_flit[R0 +: N_VC]),
      .in_pop   (in_pop[R0 +: N_VC]),
      .out_valid(out_valid[N_INTRA + l]),
      .out_vc   (out_vc[N_INTRA + l]),
      .out_flit (out_flit[N_INTRA + l]),
      .tx_space (sp)
    );
    for (genvar v = 0; v < N_VC; v++) begin : g_sp
      assign out_space[N_INTRA + l][v] = SPACE_W'(sp[v]);
    end
  end

  apr_switch #(.N_DIMS(N_DIMS), .DIM_SIZE(DIM_SIZE), .N_INTRA(N_INTRA), .SPACE_W(SPACE_W)) u_switch (
    .clk, .rst_n,
    .enable   (enable),
    .my_coord (my_coord),
    .in_valid (in_valid),
    .in_flit  (in_flit),
    .in_pop   (in_pop),
    .out_valid(out_valid),
    .out_flit (out_flit),
    .out_vc   (out_vc),
    .out_space(out_space),
    .out_pkt  (out_pkt),
    .drop     (drop)
  );

  apr_csr #(.N_PORTS(N_PORTS), .N_INTRA(N_INTRA)) u_csr (
    .clk, .rst_n,
    .cfg_addr, .cfg_wr, .cfg_wdata, .cfg_rdata,
    .my_coord (my_coord),
    .enable   (enable),
    .out_pkt  (out_pkt),
    .csum_err (csum_err),
    .drop     (drop)
  );
endmodule
