// cnn_model: behavioural stand-in for a CNN kernel of the use case (the
// real network and its weights are not part of this RTL). It connects to
// one task's channels of a node.
//  - Input channel 0: 256-bit images, two words each. One image is
//    processed every II cycles. The result, a one-word message holding the
//    number of set pixels, goes to task 0, channel 1 of the node that sent
//    the image.
//  - Input channel 3: bulk data, checked word by word against the pattern
//    {tag, index}; 'hold' stops reading it, to back traffic up.
//  - Input channels 1 and 2 are drained.
module cnn_model
  import apr_pkg::*;
#(
  parameter int NCH = 4,
  parameter int II  = 344
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hold,
  input  logic  [NCH-1:0]            m_tvalid,
  output logic  [NCH-1:0]            m_tready,
  input  logic  [NCH-1:0][FLIT_W-1:0] m_tdata,
  input  logic  [NCH-1:0]            m_tlast,
  input  dest_t [NCH-1:0]            m_tuser,
  output logic  [NCH-1:0]            s_tvalid,
  input  logic  [NCH-1:0]            s_tready,
  output logic  [NCH-1:0][FLIT_W-1:0] s_tdata,
  output logic  [NCH-1:0]            s_tlast,
  output dest_t [NCH-1:0]            s_tuser,
  output int                         images,
  output int                         bulk_words,
  output int                         bulk_msgs,
  output int                         bulk_errors
);
  logic [255:0] img;
  logic         half;
  int           busy;
  dest_t        src;
  int           bidx;

  initial begin images = 0; bulk_words = 0; bulk_msgs = 0; bulk_errors = 0; end

  always_comb begin
    m_tready    = '1;
    m_tready[0] = (busy == 0) && !s_tvalid[0];
    m_tready[3] = !hold;
  end
  assign s_tvalid[NCH-1:1] = '0;
  assign s_tdata[NCH-1:1]  = '0;
  assign s_tlast[NCH-1:1]  = '0;
  assign s_tuser[NCH-1:1]  = '0;
  assign s_tlast[0]        = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half <= 0; busy <= 0; s_tvalid[0] <= 0; s_tdata[0] <= '0; s_tuser[0] <= '0; bidx <= 0;
    end else begin
      if (busy > 0) begin
        busy <= busy - 1;
        if (busy == 1) begin
          s_tvalid[0] <= 1;
          s_tdata[0]  <= FLIT_W'($countones(img));
          s_tuser[0]  <= '{coord: src.coord, task_id: '0, ch: CH_W'(1)};
        end
      end
      if (s_tvalid[0] && s_tready[0]) s_tvalid[0] <= 0;
      if (m_tvalid[0] && m_tready[0]) begin
        if (!half) begin img[127:0] <= m_tdata[0]; src <= m_tuser[0]; half <= 1; end
        else begin
          img[255:128] <= m_tdata[0]; half <= 0; busy <= II - 2; images <= images + 1;
        end
      end
      if (m_tvalid[3] && m_tready[3]) begin
        if (m_tdata[3][63:0] != 64'(bidx)) bulk_errors <= bulk_errors + 1;
        bulk_words <= bulk_words + 1;
        bidx <= m_tlast[3] ? 0 : bidx + 1;
        if (m_tlast[3]) bulk_msgs <= bulk_msgs + 1;
      end
    end
  end
endmodule
