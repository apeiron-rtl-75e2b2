// apr_csr: Configuration/Status registers of the Routing IP.
//
// Host-visible 32-bit registers, word addressed:
//   0x00  ID      read-only constant IP_ID
//   0x01  COORD   read/write, the node's torus coordinate (4 bits per
//                 dimension, dimension 0 in bits 3:0); reset 0
//   0x02  CTRL    read/write, bit 0 = switch enable; reset 1
//   0x03  ERRORS  read-only, packets delivered with a bad footer checksum
//   0x04  DROPS   read-only, packets dropped for an unknown task number
//   0x10+p PKTS_p read-only, packets sent out of switch port p
// A write takes effect at the clock edge when cfg_wr is high. Reads return
// cfg_rdata one cycle after cfg_addr is presented. Unmapped addresses read 0.
// The document names these registers and places the node's configuration
// and status there. The register map and the simple register port (behind
// the host's PCIe interface) are this design's choices.
module apr_csr
  import apr_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned N_INTRA = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         cfg_addr,
  input  logic               cfg_wr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // to the switch
  output coord_t             my_coord,
  output logic               enable,
  // status events
  input  logic [N_PORTS-1:0] out_pkt,
  input  logic [N_INTRA-1:0] csum_err,
  input  logic               drop
);
  logic [31:0] errors, drops;
  logic [N_PORTS-1:0][31:0] pkts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      my_coord <= '0;
      enable   <= 1'b1;
      errors   <= '0;
      drops    <= '0;
      pkts     <= '0;
    end else begin
      if (cfg_wr && cfg_addr == 8'h01) my_coord <= coord_t'(cfg_wdata[$bits(coord_t)-1:0]);
      if (cfg_wr && cfg_addr == 8'h02) enable   <= cfg_wdata[0];
      errors <= errors + 32'($countones(csum_err));
      drops  <= drops + 32'(drop);
      for (int p = 0; p < N_PORTS; p++) pkts[p] <= pkts[p] + 32'(out_pkt[p]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_rdata <= '0;
    end else begin
      cfg_rdata <= '0;
      unique case (cfg_addr)
        8'h00: cfg_rdata <= IP_ID;
        8'h01: cfg_rdata <= 32'(my_coord);
        8'h02: cfg_rdata <= 32'(enable);
        8'h03: cfg_rdata <= errors;
        8'h04: cfg_rdata <= drops;
        default: begin
          for (int p = 0; p < N_PORTS; p++)
            if (cfg_addr == 8'(8'h10 + p)) cfg_rdata <= pkts[p];
        end
      endcase
    end
  end
endmodule
