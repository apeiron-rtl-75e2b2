// apr_aggregator: task-to-network adapter of an IntraNode port.
//
// A task sends messages on N_OUT_CH output channels. Each channel is an
// AXI4-Stream: 128-bit TDATA, TLAST on the last word of a message, and TUSER
// side channel carrying the destination (node coordinate, task_id, ch_id),
// held constant through a message. Each channel first enters its own
// Message OUT FIFO (CH_DEPTH words).
//
// A round-robin arbiter picks a channel with data, and the Aggregator then
// moves that channel's message word by word into the Routing IP's outgoing
// data FIFO. At the end of the message, or after MAX_LEN words, it writes
// the packet header to the outgoing header FIFO. The header holds the
// destination, the source (this node, task MY_TASK, the channel), the
// length and an end-of-message flag. Longer messages thus become several
// packets. Another channel is picked only at a message boundary. Writing
// the header after the data means the packet length is known and the port
// never waits for data mid-packet.
//
// The document gives the Aggregator's role (forge the header from the
// side channels, fill the header/data FIFOs). The channel arbitration, the
// split of long messages and the header-after-data order are this design's
// choices. Throughput: one word per cycle, plus one cycle per packet for
// the header.
// The header's reserved bits are always zero, and its source coordinate and
// task are copied straight from my_coord and my_task.
module apr_aggregator
  import apr_pkg::*;
#(
  parameter int unsigned N_OUT_CH = 4,
  parameter int unsigned CH_DEPTH = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  coord_t                           my_coord,
  input  logic [TASK_W-1:0]                my_task,
  // task output channels (AXI4-Stream slaves)
  input  logic  [N_OUT_CH-1:0]             s_tvalid,
  output logic  [N_OUT_CH-1:0]             s_tready,
  input  logic  [N_OUT_CH-1:0][FLIT_W-1:0] s_tdata,
  input  logic  [N_OUT_CH-1:0]             s_tlast,
  input  dest_t [N_OUT_CH-1:0]             s_tuser,
  // Routing IP IntraNode port, outgoing FIFOs
  output logic                             ohdr_wr,
  output header_t                          ohdr_data,
  input  logic                             ohdr_full,
  output logic                             odat_wr,
  output logic  [FLIT_W-1:0]               odat_data,
  input  logic                             odat_full
);
  localparam int unsigned CW = (N_OUT_CH > 1) ? $clog2(N_OUT_CH) : 1;
  localparam int unsigned EW = 1 + DEST_W + FLIT_W;

  typedef struct packed {
    logic              last;
    dest_t             dest;
    logic [FLIT_W-1:0] data;
  } entry_t;

  logic   [N_OUT_CH-1:0] f_empty, f_full, f_pop;
  entry_t [N_OUT_CH-1:0] f_head;

  for (genvar c = 0; c < N_OUT_CH; c++) begin : g_ch
    logic [EW-1:0] h;
    apr_fifo #(.W(EW), .DEPTH(CH_DEPTH)) u_msg (
      .clk, .rst_n,
      .wr_en  (s_tvalid[c] && s_tready[c]),
      .wr_data({s_tlast[c], s_tuser[c], s_tdata[c]}),
      .rd_en  (f_pop[c]),
      .rd_data(h),
      .empty  (f_empty[c]),
      .full   (f_full[c]),
      .count  (),
      .free   ()
    );
    assign f_head[c]   = entry_t'(h);
    assign s_tready[c] = !f_full[c];
  end

  typedef enum logic [1:0] {A_IDLE, A_MOVE, A_HDR} agg_state_e;
  agg_state_e         st;
  logic [CW-1:0]      cur;
  logic [LEN_W-1:0]   cnt;
  dest_t              pdest;
  logic               peom;
  logic [N_OUT_CH-1:0] gnt;
  logic               pick, mv;
  entry_t             h;

  assign pick = (st == A_IDLE) && (~f_empty != '0);
  apr_rr_arbiter #(.N(N_OUT_CH)) u_arb (
    .clk, .rst_n, .req(~f_empty & {N_OUT_CH{st == A_IDLE}}), .advance(1'b1), .gnt(gnt));

  assign h  = f_head[cur];
  assign mv = (st == A_MOVE) && !f_empty[cur] && !odat_full;

  always_comb begin
    f_pop = '0;
    if (mv) f_pop[cur] = 1'b1;
  end

  assign odat_wr   = mv;
  assign odat_data = h.data;

  always_comb begin
    ohdr_data           = '0;
    ohdr_data.dst_coord = pdest.coord;
    ohdr_data.dst_task  = pdest.task_id;
    ohdr_data.dst_ch    = pdest.ch;
    ohdr_data.src_coord = my_coord;
    ohdr_data.src_task  = my_task;
    ohdr_data.src_ch    = CH_W'(cur);
    ohdr_data.len       = cnt;
    ohdr_data.eom       = peom;
  end
  assign ohdr_wr = (st == A_HDR) && !ohdr_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= A_IDLE;
      cur   <= '0;
      cnt   <= '0;
      pdest <= '0;
      peom  <= 1'b0;
    end else begin
      unique case (st)
        A_IDLE: if (pick) begin
          for (int c = 0; c < N_OUT_CH; c++) if (gnt[c]) cur <= CW'(c);
          cnt <= '0;
          st  <= A_MOVE;
        end
        A_MOVE: if (mv) begin
          if (cnt == '0) pdest <= h.dest;
          cnt <= cnt + 1'b1;
          if (h.last || cnt == LEN_W'(MAX_LEN - 1)) begin
            peom <= h.last;
            st   <= A_HDR;
          end
        end
        default: if (ohdr_wr) begin
          cnt <= '0;
          st  <= peom ? A_IDLE : A_MOVE;
        end
      endcase
    end
  end
endmodule
