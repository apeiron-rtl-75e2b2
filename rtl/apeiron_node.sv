// apeiron_node: the Communication IP of one FPGA, with its task adapters.
//
// One Routing IP (switch, router, arbiter, registers, InterNode and IntraNode
// interfaces) and, on each of its N_INTRA IntraNode ports, an Aggregator for
// the task's N_CH output channels and a Dispatcher for its N_CH input
// channels. A task connected to port t sees plain AXI4-Stream channels. It
// sends by writing a message with the destination (node coordinate, task,
// channel) in TUSER. It receives by reading the channel the sender named.
// The node's own coordinate is set through the register port (register
// 0x01). The 2*N_DIMS InterNode links are ports: link 2d goes to the
// neighbour at coordinate +1 in dimension d, link 2d+1 to the one at -1,
// each as a flit stream with virtual-channel tag plus per-VC credit
// returns. The transceiver link layer is outside.
//
// The structure (Routing IP plus Aggregator/Dispatcher per IntraNode port)
// follows the framework. The equal channel count for every task is this
// design's simplification.
module apeiron_node
  import apr_pkg::*;
#(
  parameter int unsigned N_DIMS     = 1,
  parameter int unsigned DIM_SIZE   = 4,
  parameter int unsigned N_INTRA    = 2,
  parameter int unsigned N_CH       = 4,
  parameter int unsigned CH_DEPTH   = 16,
  parameter int unsigned VC_DEPTH   = 512,
  parameter int unsigned DATA_DEPTH = 512,
  localparam int unsigned N_LINK    = 2 * N_DIMS
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [7:0]                              cfg_addr,
  input  logic                                    cfg_wr,
  input  logic [31:0]                             cfg_wdata,
  output logic [31:0]                             cfg_rdata,
  // task output channels (to the network)
  input  logic  [N_INTRA-1:0][N_CH-1:0]           s_tvalid,
  output logic  [N_INTRA-1:0][N_CH-1:0]           s_tready,
  input  logic  [N_INTRA-1:0][N_CH-1:0][FLIT_W-1:0] s_tdata,
  input  logic  [N_INTRA-1:0][N_CH-1:0]           s_tlast,
  input  dest_t [N_INTRA-1:0][N_CH-1:0]           s_tuser,
  // task input channels (from the network)
  output logic  [N_INTRA-1:0][N_CH-1:0]           m_tvalid,
  input  logic  [N_INTRA-1:0][N_CH-1:0]           m_tready,
  output logic  [N_INTRA-1:0][N_CH-1:0][FLIT_W-1:0] m_tdata,
  output logic  [N_INTRA-1:0][N_CH-1:0]           m_tlast,
  output dest_t [N_INTRA-1:0][N_CH-1:0]           m_tuser,
  output logic  [N_INTRA-1:0]                     bad_ch,
  // InterNode links
  input  link_t [N_LINK-1:0]                      rx,
  output logic  [N_LINK-1:0][N_VC-1:0]            rx_credit,
  output link_t [N_LINK-1:0]                      tx,
  input  logic  [N_LINK-1:0][N_VC-1:0]            tx_credit
);
  coord_t                             my_coord;
  logic    [N_INTRA-1:0]              ohdr_wr, ohdr_full, odat_wr, odat_full;
  header_t [N_INTRA-1:0]              ohdr_data, ihdr_data;
  logic    [N_INTRA-1:0][FLIT_W-1:0]  odat_data, idat_data;
  logic    [N_INTRA-1:0]              ihdr_rd, ihdr_empty, idat_rd, idat_empty;

  apr_routing_ip #(
    .N_DIMS(N_DIMS), .DIM_SIZE(DIM_SIZE), .N_INTRA(N_INTRA),
    .VC_DEPTH(VC_DEPTH), .DATA_DEPTH(DATA_DEPTH)
  ) u_rip (
    .clk, .rst_n,
    .cfg_addr, .cfg_wr, .cfg_wdata, .cfg_rdata,
    .my_coord,
    .ohdr_wr, .ohdr_data, .ohdr_full, .odat_wr, .odat_data, .odat_full,
    .ihdr_rd, .ihdr_data, .ihdr_empty, .idat_rd, .idat_data, .idat_empty,
    .rx, .rx_credit, .tx, .tx_credit
  );

  for (genvar t = 0; t < N_INTRA; t++) begin : g_task
    apr_aggregator #(.N_OUT_CH(N_CH), .CH_DEPTH(CH_DEPTH)) u_agg (
      .clk, .rst_n,
      .my_coord (my_coord),
      .my_task  (TASK_W'(t)),
      .s_tvalid (s_tvalid[t]), .s_tready(s_tready[t]), .s_tdata(s_tdata[t]),
      .s_tlast  (s_tlast[t]),  .s_tuser (s_tuser[t]),
      .ohdr_wr  (ohdr_wr[t]),  .ohdr_data(ohdr_data[t]), .ohdr_full(ohdr_full[t]),
      .odat_wr  (odat_wr[t]),  .odat_data(odat_data[t]), .odat_full(odat_full[t])
    );
    apr_dispatcher #(.N_IN_CH(N_CH), .CH_DEPTH(CH_DEPTH)) u_disp (
      .clk, .rst_n,
      .ihdr_rd  (ihdr_rd[t]),  .ihdr_data(ihdr_data[t]), .ihdr_empty(ihdr_empty[t]),
      .idat_rd  (idat_rd[t]),  .idat_data(idat_data[t]), .idat_empty(idat_empty[t]),
      .m_tvalid (m_tvalid[t]), .m_tready(m_tready[t]), .m_tdata(m_tdata[t]),
      .m_tlast  (m_tlast[t]),  .m_tuser (m_tuser[t]),
      .bad_ch   (bad_ch[t])
    );
  end
endmodule
