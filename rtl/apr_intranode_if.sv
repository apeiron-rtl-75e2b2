// apr_intranode_if: IntraNode port of the Routing IP.
//
// The port between the switch and one HLS task. As in the framework, each
// direction has a header FIFO and a data FIFO: the task-side Aggregator
// writes a packet header and its payload words, and the Dispatcher reads
// them back out on the way in.
//
// Inject (task to switch): when a header is waiting, the port sends a header
// flit, then 'len' payload flits from the data FIFO, then a footer flit
// holding the payload checksum it computed on the way. The Aggregator
// writes the header only after the payload, so a packet never waits for
// data once it has started.
//
// Eject (switch to task): header flits go to the outbound header FIFO and
// payload flits to the outbound data FIFO. The footer is not stored: its
// checksum is compared with the one computed here, and a mismatch pulses
// 'csum_err'. The switch admits a packet only when 'ej_space' (data FIFO
// free words + 2, or 0 when the header FIFO is full) covers the whole
// packet, so the eject side never has to stall.
//
// The header/data FIFO split is the document's. The footer checksum, the
// FIFO depths and the "header after payload" order are this design's
// choices.
module apr_intranode_if
  import apr_pkg::*;
#(
  parameter int unsigned HDR_DEPTH  = 8,
  parameter int unsigned DATA_DEPTH = 512,
  localparam int unsigned SW = $clog2(DATA_DEPTH + 3)
) (
  input  logic              clk,
  input  logic              rst_n,
  // task side, outgoing packets (written by the Aggregator)
  input  logic              ohdr_wr,
  input  header_t           ohdr_data,
  output logic              ohdr_full,
  input  logic              odat_wr,
  input  logic [FLIT_W-1:0] odat_data,
  output logic              odat_full,
  // task side, incoming packets (read by the Dispatcher)
  input  logic              ihdr_rd,
  output header_t           ihdr_data,
  output logic              ihdr_empty,
  input  logic              idat_rd,
  output logic [FLIT_W-1:0] idat_data,
  output logic              idat_empty,
  // switch side, inject
  output logic              inj_valid,
  output flit_t             inj_flit,
  input  logic              inj_ready,
  // switch side, eject
  input  logic              ej_valid,
  input  flit_t             ej_flit,
  output logic [SW-1:0]     ej_space,
  output logic              csum_err
);
  localparam int unsigned HW = $clog2(HDR_DEPTH + 1);
  localparam int unsigned DW = $clog2(DATA_DEPTH + 1);

  // ---------------- inject ----------------
  typedef enum logic [1:0] {I_HEAD, I_DATA, I_FOOT} inj_state_e;
  inj_state_e         ist;
  logic [LEN_W-1:0]   irem, ilen;
  logic [CSUM_W-1:0]  icsum;
  logic               oh_empty, od_empty;
  logic [$bits(header_t)-1:0] oh_head;
  logic [FLIT_W-1:0]  od_head;
  logic               inj_fire;
  footer_t            ifoot;
  header_t            oh_hdr;

  assign oh_hdr = header_t'(oh_head);

  apr_fifo #(.W($bits(header_t)), .DEPTH(HDR_DEPTH)) u_ohdr (
    .clk, .rst_n, .wr_en(ohdr_wr), .wr_data(ohdr_data), .rd_en(inj_fire && ist == I_HEAD),
    .rd_data(oh_head), .empty(oh_empty), .full(ohdr_full), .count(), .free());
  apr_fifo #(.W(FLIT_W), .DEPTH(DATA_DEPTH)) u_odat (
    .clk, .rst_n, .wr_en(odat_wr), .wr_data(odat_data), .rd_en(inj_fire && ist == I_DATA),
    .rd_data(od_head), .empty(od_empty), .full(odat_full), .count(), .free());

  always_comb begin
    ifoot      = '0;
    ifoot.len  = ilen;
    ifoot.csum = icsum;
    unique case (ist)
      I_HEAD:  begin inj_valid = !oh_empty; inj_flit = '{kind: FK_HEAD, data: oh_head}; end
      I_DATA:  begin inj_valid = !od_empty; inj_flit = '{kind: FK_DATA, data: od_head}; end
      default: begin inj_valid = 1'b1;      inj_flit = '{kind: FK_FOOT, data: ifoot};   end
    endcase
  end
  assign inj_fire = inj_valid && inj_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ist   <= I_HEAD;
      irem  <= '0;
      ilen  <= '0;
      icsum <= '0;
    end else if (inj_fire) begin
      unique case (ist)
        I_HEAD: begin
          ist   <= I_DATA;
          irem  <= oh_hdr.len;
          ilen  <= oh_hdr.len;
          icsum <= '0;
        end
        I_DATA: begin
          icsum <= csum_step(icsum, od_head);
          irem  <= irem - 1'b1;
          if (irem == LEN_W'(1)) ist <= I_FOOT;
        end
        default: ist <= I_HEAD;
      endcase
    end
  end

  // ---------------- eject ----------------
  logic [CSUM_W-1:0] ecsum;
  logic [HW-1:0]     ih_free;
  logic [DW-1:0]     id_free;
  logic [$bits(header_t)-1:0] ih_head;
  footer_t           efoot;

  assign efoot = footer_t'(ej_flit.data);

  apr_fifo #(.W($bits(header_t)), .DEPTH(HDR_DEPTH)) u_ihdr (
    .clk, .rst_n, .wr_en(ej_valid && ej_flit.kind == FK_HEAD), .wr_data(ej_flit.data),
    .rd_en(ihdr_rd), .rd_data(ih_head), .empty(ihdr_empty), .full(), .count(), .free(ih_free));
  apr_fifo #(.W(FLIT_W), .DEPTH(DATA_DEPTH)) u_idat (
    .clk, .rst_n, .wr_en(ej_valid && ej_flit.kind == FK_DATA), .wr_data(ej_flit.data),
    .rd_en(idat_rd), .rd_data(idat_data), .empty(idat_empty), .full(), .count(), .free(id_free));
  assign ihdr_data = header_t'(ih_head);
  assign ej_space  = (ih_free == '0) ? '0 : SW'(id_free) + SW'(2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ecsum    <= '0;
      csum_err <= 1'b0;
    end else begin
      csum_err <= 1'b0;
      if (ej_valid) begin
        unique case (ej_flit.kind)
          FK_HEAD: ecsum <= '0;
          FK_DATA: ecsum <= csum_step(ecsum, ej_flit.data);
          FK_FOOT: csum_err <= (efoot.csum != ecsum);
          default: ;
        endcase
      end
    end
  end
endmodule
