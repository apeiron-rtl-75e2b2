// apeiron_top: preprocessing node of the particle-identification use case.
//
// One FPGA node: the Communication IP with task adapters (apeiron_node). The
// Imagifier kernel (apr_imagifier) sits on the last IntraNode port,
// N_INTRA-1. The other IntraNode ports (port 0 by default, where the
// sender and receiver kernels that move data to and from host memory sit)
// are top-level AXI4-Stream ports, as are the InterNode links and the
// host register port.
//
// Data flow in the use case: the sender on port 0 sends each event's hit
// list as a message to (this node, task N_INTRA-1, channel 0). The
// Imagifier turns it into a 256-bit image and sends it to one of the
// configured CNN targets (img_target, used in turn), usually tasks on other
// nodes reached over the links. The CNN results come back as messages to
// port 0, where the receiver reads them.
//
// On the Imagifier's port, input channel 0 carries hit lists and output
// channel 0 carries images. Its other input channels are drained and
// discarded; its other output channels are idle. Placing the Imagifier on
// the last port follows the use-case figure, where it shares a node with the
// sender and receiver. The drain of unused channels is this design's choice.
module apeiron_top
  import apr_pkg::*;
#(
  parameter int unsigned N_DIMS     = 1,
  parameter int unsigned DIM_SIZE   = 4,
  parameter int unsigned N_INTRA    = 2,
  parameter int unsigned N_CH       = 4,
  parameter int unsigned CH_DEPTH   = 16,
  parameter int unsigned VC_DEPTH   = 512,
  parameter int unsigned DATA_DEPTH = 512,
  parameter int unsigned N_TARGETS  = 6,
  localparam int unsigned N_LINK    = 2 * N_DIMS,
  localparam int unsigned N_EXT     = N_INTRA - 1,
  localparam int unsigned TW        = $clog2(N_TARGETS + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [7:0]                            cfg_addr,
  input  logic                                  cfg_wr,
  input  logic [31:0]                           cfg_wdata,
  output logic [31:0]                           cfg_rdata,
  // Imagifier configuration
  input  logic  [TW-1:0]                        img_n_targets,
  input  dest_t [N_TARGETS-1:0]                 img_target,
  // tasks on IntraNode ports 0..N_INTRA-2
  input  logic  [N_EXT-1:0][N_CH-1:0]           s_tvalid,
  output logic  [N_EXT-1:0][N_CH-1:0]           s_tready,
  input  logic  [N_EXT-1:0][N_CH-1:0][FLIT_W-1:0] s_tdata,
  input  logic  [N_EXT-1:0][N_CH-1:0]           s_tlast,
  input  dest_t [N_EXT-1:0][N_CH-1:0]           s_tuser,
  output logic  [N_EXT-1:0][N_CH-1:0]           m_tvalid,
  input  logic  [N_EXT-1:0][N_CH-1:0]           m_tready,
  output logic  [N_EXT-1:0][N_CH-1:0][FLIT_W-1:0] m_tdata,
  output logic  [N_EXT-1:0][N_CH-1:0]           m_tlast,
  output dest_t [N_EXT-1:0][N_CH-1:0]           m_tuser,
  output logic  [N_INTRA-1:0]                   bad_ch,
  // InterNode links
  input  link_t [N_LINK-1:0]                    rx,
  output logic  [N_LINK-1:0][N_VC-1:0]          rx_credit,
  output link_t [N_LINK-1:0]                    tx,
  input  logic  [N_LINK-1:0][N_VC-1:0]          tx_credit
);
  localparam int unsigned IMG = N_INTRA - 1;

  logic  [N_INTRA-1:0][N_CH-1:0]             n_s_tvalid, n_s_tready, n_s_tlast;
  logic  [N_INTRA-1:0][N_CH-1:0][FLIT_W-1:0] n_s_tdata, n_m_tdata;
  dest_t [N_INTRA-1:0][N_CH-1:0]             n_s_tuser, n_m_tuser;
  logic  [N_INTRA-1:0][N_CH-1:0]             n_m_tvalid, n_m_tready, n_m_tlast;

  apeiron_node #(
    .N_DIMS(N_DIMS), .DIM_SIZE(DIM_SIZE), .N_INTRA(N_INTRA), .N_CH(N_CH),
    .CH_DEPTH(CH_DEPTH), .VC_DEPTH(VC_DEPTH), .DATA_DEPTH(DATA_DEPTH)
  ) u_node (
    .clk, .rst_n,
    .cfg_addr, .cfg_wr, .cfg_wdata, .cfg_rdata,
    .s_tvalid(n_s_tvalid), .s_tready(n_s_tready), .s_tdata(n_s_tdata),
    .s_tlast (n_s_tlast),  .s_tuser (n_s_tuser),
    .m_tvalid(n_m_tvalid), .m_tready(n_m_tready), .m_tdata(n_m_tdata),
    .m_tlast (n_m_tlast),  .m_tuser (n_m_tuser),
    .bad_ch,
    .rx, .rx_credit, .tx, .tx_credit
  );

  // external tasks
  for (genvar t = 0; t < N_EXT; t++) begin : g_ext
    assign n_s_tvalid[t] = s_tvalid[t];
    assign n_s_tdata[t]  = s_tdata[t];
    assign n_s_tlast[t]  = s_tlast[t];
    assign n_s_tuser[t]  = s_tuser[t];
    assign s_tready[t]   = n_s_tready[t];
    assign m_tvalid[t]   = n_m_tvalid[t];
    assign m_tdata[t]    = n_m_tdata[t];
    assign m_tlast[t]    = n_m_tlast[t];
    assign m_tuser[t]    = n_m_tuser[t];
    assign n_m_tready[t] = m_tready[t];
  end

  // Imagifier task
  logic img_s_tready;
  apr_imagifier #(.N_TARGETS(N_TARGETS)) u_img (
    .clk, .rst_n,
    .n_targets(img_n_targets),
    .target   (img_target),
    .s_tvalid (n_m_tvalid[IMG][0]),
    .s_tready (img_s_tready),
    .s_tdata  (n_m_tdata[IMG][0]),
    .s_tlast  (n_m_tlast[IMG][0]),
    .m_tvalid (n_s_tvalid[IMG][0]),
    .m_tready (n_s_tready[IMG][0]),
    .m_tdata  (n_s_tdata[IMG][0]),
    .m_tlast  (n_s_tlast[IMG][0]),
    .m_tuser  (n_s_tuser[IMG][0])
  );
  always_comb begin
    n_m_tready[IMG]    = '1;          // unused input channels are drained
    n_m_tready[IMG][0] = img_s_tready;
  end
  for (genvar c = 1; c < N_CH; c++) begin : g_idle
    assign n_s_tvalid[IMG][c] = 1'b0;
    assign n_s_tdata[IMG][c]  = '0;
    assign n_s_tlast[IMG][c]  = 1'b0;
    assign n_s_tuser[IMG][c]  = '0;
  end
endmodule
