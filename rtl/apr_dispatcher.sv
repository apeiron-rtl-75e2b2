// apr_dispatcher: network-to-task adapter of an IntraNode port.
//
// Reads each packet delivered to the IntraNode port: first its header from
// the incoming header FIFO, then 'len' words from the incoming data FIFO.
// It forwards the words to the task input channel named by the header's
// ch_id, through that channel's Message IN FIFO (CH_DEPTH words). Each
// channel leaves as an AXI4-Stream: TLAST marks the last word of a message
// (the last word of a packet whose end-of-message flag is set). TUSER
// carries the sender's coordinate, task and channel. A full channel FIFO
// stalls the Dispatcher, and with it the port, until the task drains it, as
// with a blocking receive(). A packet for a channel number the task does
// not have is read and discarded, with a pulse on 'bad_ch'.
//
// The document gives the Dispatcher's role (route incoming packets to the
// right input channel by the header fields). The FIFO sizes, the drop
// behaviour and the TUSER content are this design's choices. Throughput:
// one word per cycle, plus one cycle per packet for the header.
module apr_dispatcher
  import apr_pkg::*;
#(
  parameter int unsigned N_IN_CH  = 4,
  parameter int unsigned CH_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // Routing IP IntraNode port, incoming FIFOs
  output logic                            ihdr_rd,
  input  header_t                         ihdr_data,
  input  logic                            ihdr_empty,
  output logic                            idat_rd,
  input  logic  [FLIT_W-1:0]              idat_data,
  input  logic                            idat_empty,
  // task input channels (AXI4-Stream masters)
  output logic  [N_IN_CH-1:0]             m_tvalid,
  input  logic  [N_IN_CH-1:0]             m_tready,
  output logic  [N_IN_CH-1:0][FLIT_W-1:0] m_tdata,
  output logic  [N_IN_CH-1:0]             m_tlast,
  output dest_t [N_IN_CH-1:0]             m_tuser,
  output logic                            bad_ch
);
  localparam int unsigned EW = 1 + DEST_W + FLIT_W;

  typedef enum logic [1:0] {D_IDLE, D_MOVE, D_DROP} disp_state_e;
  disp_state_e       st;
  header_t           hdr;
  logic [LEN_W-1:0]  rem;
  logic [N_IN_CH-1:0] f_full;
  logic              ch_ok, mv, sel_full;
  dest_t             src;

  assign ch_ok   = int'(hdr.dst_ch) < N_IN_CH;
  assign ihdr_rd = (st == D_IDLE) && !ihdr_empty;
  assign mv      = (st == D_MOVE) && !idat_empty && !sel_full;
  assign idat_rd = mv || ((st == D_DROP) && !idat_empty);
  assign src     = '{coord: hdr.src_coord, task_id: hdr.src_task, ch: hdr.src_ch};

  always_comb begin
    sel_full = 1'b0;
    for (int c = 0; c < N_IN_CH; c++) if (int'(hdr.dst_ch) == c) sel_full = f_full[c];
  end

  for (genvar c = 0; c < N_IN_CH; c++) begin : g_ch
    logic [EW-1:0] h;
    logic          empty;
    apr_fifo #(.W(EW), .DEPTH(CH_DEPTH)) u_msg (
      .clk, .rst_n,
      .wr_en  (mv && int'(hdr.dst_ch) == c),
      .wr_data({hdr.eom && rem == LEN_W'(1), src, idat_data}),
      .rd_en  (m_tvalid[c] && m_tready[c]),
      .rd_data(h),
      .empty  (empty),
      .full   (f_full[c]),
      .count  (),
      .free   ()
    );
    assign m_tvalid[c] = !empty;
    assign {m_tlast[c], m_tuser[c], m_tdata[c]} = h;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= D_IDLE;
      hdr    <= '0;
      rem    <= '0;
      bad_ch <= 1'b0;
    end else begin
      bad_ch <= 1'b0;
      unique case (st)
        D_IDLE: if (ihdr_rd) begin
          hdr <= ihdr_data;
          rem <= ihdr_data.len;
          if (int'(ihdr_data.dst_ch) < N_IN_CH) st <= D_MOVE;
          else begin
            st     <= D_DROP;
            bad_ch <= 1'b1;
          end
        end
        default: if (idat_rd) begin
          rem <= rem - 1'b1;
          if (rem == LEN_W'(1)) st <= D_IDLE;
        end
      endcase
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n) ihdr_rd |-> ihdr_data.len != '0);
  // ch_ok is only used by the assertion below
  a_chok: assert property (@(posedge clk) disable iff (!rst_n) (st == D_MOVE) |-> ch_ok);
endmodule
