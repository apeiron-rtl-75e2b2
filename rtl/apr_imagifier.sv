// apr_imagifier: use-case kernel turning a PMT hit list into an image.
//
// In the particle-identification use case, each physics event arrives as a
// list of hit photomultipliers (PMTs). The kernel turns it into one 256-bit
// word, a 16x16 black-and-white image, and sends it to a CNN kernel.
//
// Input (AXI4-Stream from a Dispatcher channel): each 128-bit word holds
// eight 16-bit hit slots. Slot bit 15 marks a valid hit and bits 7:0 give
// the PMT index (row = index[7:4], column = index[3:0]). TLAST ends the
// event. Image bit 'index' is set for every hit.
// Output (AXI4-Stream to an Aggregator channel): the image as a two-word
// message, bits 127:0 (rows 0-7) first, then bits 255:128 (rows 8-15) with
// TLAST. TUSER is the destination: the configured CNN targets
// target[0..n_targets-1] are used in turn, one event each, so events are
// spread over one or several CNN kernels.
// Timing: one input word per cycle. After an event's last word the image
// leaves in the next two cycles, during which the input is stalled.
//
// The document gives the kernel's function (hit list in, 256-bit 16x16
// image out, to one or more CNN kernels). The hit-list encoding and the
// round-robin choice of target are this design's choices.
module apr_imagifier
  import apr_pkg::*;
#(
  parameter int unsigned N_TARGETS = 6,
  localparam int unsigned TW = $clog2(N_TARGETS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic  [TW-1:0]              n_targets,  // 1..N_TARGETS
  input  dest_t [N_TARGETS-1:0]       target,
  // hit list in
  input  logic                        s_tvalid,
  output logic                        s_tready,
  input  logic  [FLIT_W-1:0]          s_tdata,
  input  logic                        s_tlast,
  // image out
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic  [FLIT_W-1:0]          m_tdata,
  output logic                        m_tlast,
  output dest_t                       m_tuser
);
  localparam int unsigned SLOTS = FLIT_W / 16;

  typedef enum logic [1:0] {G_ACC, G_OUT0, G_OUT1} img_state_e;
  img_state_e   st;
  logic [255:0] img, hits;
  logic [TW-1:0] tsel;

  always_comb begin
    hits = '0;
    for (int k = 0; k < SLOTS; k++)
      if (s_tdata[16 * k + 15]) hits[s_tdata[16 * k +: 8]] = 1'b1;
  end

  assign s_tready = (st == G_ACC);
  assign m_tvalid = (st != G_ACC);
  assign m_tdata  = (st == G_OUT1) ? img[255:128] : img[127:0];
  assign m_tlast  = (st == G_OUT1);

  always_comb begin
    m_tuser = target[0];
    for (int t = 0; t < N_TARGETS; t++) if (tsel == TW'(t)) m_tuser = target[t];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= G_ACC;
      img  <= '0;
      tsel <= '0;
    end else begin
      unique case (st)
        G_ACC: if (s_tvalid) begin
          img <= img | hits;
          if (s_tlast) st <= G_OUT0;
        end
        G_OUT0: if (m_tready) st <= G_OUT1;
        default: if (m_tready) begin
          st   <= G_ACC;
          img  <= '0;
          tsel <= (tsel + 1'b1 >= n_targets) ? '0 : tsel + 1'b1;
        end
      endcase
    end
  end
endmodule
