// apr_switch: Switch component of the Routing IP, with its Router and
// Arbiter.
//
// The switch connects every input to every output port. Its inputs are the
// IntraNode ports (one each) and every virtual channel (VC) of every
// InterNode port (two per port), N_REQ in all. Its outputs are the
// N_PORTS = N_INTRA + 2*N_DIMS ports.
//
// How a packet crosses:
//  1. A header flit at the head of an input is routed by apr_dor_router
//     (one per input), which gives the output port and output VC.
//  2. The input asks for that output only when the output reports room for
//     the whole packet (len + 2 flits) in the chosen VC. This is Virtual
//     Cut-Through: forwarding starts as soon as a direction is picked and
//     the buffer ahead can hold the packet.
//  3. Each free output's round-robin arbiter picks one asking input. The
//     grant is registered, and from the next cycle the input's flits flow
//     straight to the output, one per cycle when available, until its footer
//     has passed. The output then becomes free again.
// Because the whole packet is reserved before it starts, an output never
// stalls mid-packet, and out_valid needs no ready.
//
// A packet for a task number with no IntraNode port is consumed and
// dropped, with a pulse on 'drop'. While 'enable' is low no new packet is
// started. The document gives the switch, router and arbiter roles and the
// VCT rule. Granting per packet with a locked output, the registered grant
// and the drop behaviour are this design's choices.
module apr_switch
  import apr_pkg::*;
#(
  parameter int unsigned N_DIMS   = 1,
  parameter int unsigned DIM_SIZE = 4,
  parameter int unsigned N_INTRA  = 2,
  parameter int unsigned SPACE_W  = 11,
  localparam int unsigned N_LINK  = 2 * N_DIMS,
  localparam int unsigned N_PORTS = N_INTRA + N_LINK,
  localparam int unsigned N_REQ   = N_INTRA + N_VC * N_LINK,
  localparam int unsigned PW      = $clog2(N_PORTS),
  localparam int unsigned RW      = $clog2(N_REQ)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   enable,
  input  coord_t                                 my_coord,
  // inputs: IntraNode ports, then link l / VC v at N_INTRA + 2*l + v
  input  logic  [N_REQ-1:0]                      in_valid,
  input  flit_t [N_REQ-1:0]                      in_flit,
  output logic  [N_REQ-1:0]                      in_pop,
  // outputs
  output logic  [N_PORTS-1:0]                    out_valid,
  output flit_t [N_PORTS-1:0]                    out_flit,
  output logic  [N_PORTS-1:0]                    out_vc,
  input  logic  [N_PORTS-1:0][N_VC-1:0][SPACE_W-1:0] out_space,
  // statistics
  output logic  [N_PORTS-1:0]                    out_pkt,
  output logic                                   drop
);
  // ---------------- per input: route and request ----------------
  logic [N_REQ-1:0]         busy;      // granted, forwarding a packet
  logic [N_REQ-1:0]         dropping;  // draining a packet with no destination
  logic [N_REQ-1:0]         rdrop, want, head;
  logic [N_REQ-1:0][PW-1:0] rport;
  logic [N_REQ-1:0]         rvc;

  for (genvar r = 0; r < N_REQ; r++) begin : g_in
    header_t hdr;
    logic    fits;
    assign hdr = header_t'(in_flit[r].data);

    apr_dor_router #(.N_DIMS(N_DIMS), .DIM_SIZE(DIM_SIZE), .N_INTRA(N_INTRA)) u_route (
      .my_coord  (my_coord),
      .dst_coord (hdr.dst_coord),
      .dst_task  (hdr.dst_task),
      .in_is_link(r >= N_INTRA),
      .in_port   (PW'((r < N_INTRA) ? r : N_INTRA + (r - N_INTRA) / N_VC)),
      .in_vc     (1'((r < N_INTRA) ? 0 : (r - N_INTRA) % N_VC)),
      .out_port  (rport[r]),
      .out_vc    (rvc[r]),
      .drop      (rdrop[r])
    );

    assign head[r] = in_valid[r] && in_flit[r].kind == FK_HEAD && !busy[r] && !dropping[r];
    assign fits    = {1'b0, out_space[rport[r]][rvc[r]]} >=
                     (SPACE_W + 1)'(hdr.len) + (SPACE_W + 1)'(2);
    assign want[r] = enable && head[r] && !rdrop[r] && fits;
  end

  // ---------------- per output: arbitrate and forward ----------------
  logic [N_PORTS-1:0]         owned;
  logic [N_PORTS-1:0][RW-1:0] owner;
  logic [N_PORTS-1:0]         ovc;
  logic [N_PORTS-1:0][N_REQ-1:0] req, gnt;

  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    for (genvar r = 0; r < N_REQ; r++) begin : g_req
      assign req[o][r] = want[r] && rport[r] == PW'(o) && !owned[o];
    end

    apr_rr_arbiter #(.N(N_REQ)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(1'b1),
      .gnt    (gnt[o])
    );

    assign out_valid[o] = owned[o] && in_valid[owner[o]];
    assign out_flit[o]  = in_flit[owner[o]];
    assign out_vc[o]    = ovc[o];
    assign out_pkt[o]   = out_valid[o] && out_flit[o].kind == FK_HEAD;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        owned[o] <= 1'b0;
        owner[o] <= '0;
        ovc[o]   <= 1'b0;
      end else if (!owned[o]) begin
        for (int r = 0; r < N_REQ; r++) begin
          if (gnt[o][r]) begin
            owned[o] <= 1'b1;
            owner[o] <= RW'(r);
            ovc[o]   <= rvc[r];
          end
        end
      end else if (out_valid[o] && out_flit[o].kind == FK_FOOT) begin
        owned[o] <= 1'b0;
      end
    end
  end

  // ---------------- per input: state and pops ----------------
  always_comb begin
    drop = 1'b0;
    for (int r = 0; r < N_REQ; r++) begin
      in_pop[r] = dropping[r] ? in_valid[r] : (busy[r] && in_valid[r]);
      if (enable && head[r] && rdrop[r]) drop = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= '0;
      dropping <= '0;
    end else begin
      for (int r = 0; r < N_REQ; r++) begin
        logic granted;
        granted = 1'b0;
        for (int o = 0; o < N_PORTS; o++) granted |= gnt[o][r];
        if (granted) busy[r] <= 1'b1;
        else if (busy[r] && in_valid[r] && in_flit[r].kind == FK_FOOT) busy[r] <= 1'b0;
        if (enable && head[r] && rdrop[r]) dropping[r] <= 1'b1;
        else if (dropping[r] && in_valid[r] && in_flit[r].kind == FK_FOOT) dropping[r] <= 1'b0;
      end
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           !(|(want & busy)));
endmodule
